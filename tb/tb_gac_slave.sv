// tb_gac_slave: self-checking test of the ancillary logic's CSR slave.
// A master model runs primary address cycles, secondary address cycles and
// random data cycles on a bus whose AK and DK are the slave's own drivers.
// Checked against values worked out by hand from the register definitions:
// selection only at address 255 in CSR space (local and global format),
// the CSR#0 ID word, CSR#3 write/read and its use as GP, NTA write/read,
// SS = 6 for every rejected operation, the AK and DK delays, and the clear.
module tb_gac_slave;
  localparam int unsigned GP_W = 8, T_DTAS = 2, T_DTDS = 3, T_DTDK = 3;
  localparam logic [15:0] ID = 16'h0014;
  logic clk = 1'b0;
  logic clr, as_i, ds_i, rd;
  logic [1:0] ms;
  logic [31:0] ad_m;              // master's AD drivers
  logic [31:0] ad_bus;
  logic sel, ak, dk, ad_oe;
  logic [2:0] ss;
  logic [31:0] ad_s;
  logic [GP_W-1:0] gp;
  int checks = 0, failures = 0;

  assign ad_bus = ad_m | (ad_oe ? ad_s : 32'h0);

  gac_slave #(.GP_W(GP_W), .MODULE_ID(ID), .T_DTAS(T_DTAS), .T_DTDS(T_DTDS), .T_DTDK(T_DTDK)) dut (
    .clk(clk), .clr(clr), .as_i(as_i), .ak_i(ak), .ds_i(ds_i), .dk_i(dk), .ms_i(ms), .rd_i(rd),
    .ad_i(ad_bus), .sel(sel), .ak_drv(ak), .dk_drv(dk), .ss_drv(ss), .ad_drv(ad_s),
    .ad_oe(ad_oe), .gp(gp));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Primary address cycle; returns whether AK came and after how many cycles.
  task automatic address(input logic [31:0] a, input logic [1:0] m, output bit got, output int n);
    @(negedge clk); ad_m = a; ms = m; as_i = 1'b1; rd = 1'b0;
    n = 0;
    while (!ak && n < 30) begin @(posedge clk); #1; n++; end
    got = ak;
    @(negedge clk); ad_m = '0;
  endtask

  task automatic release_bus();
    @(negedge clk); as_i = 1'b0;
    @(posedge clk); #1;
    check(!ak, "AK(d) follows AS(d)");
    cyc(2);
  endtask

  // Data cycle; returns the SS response and read data at DK(u).
  task automatic data(input logic [1:0] m, input bit r, input logic [31:0] w,
                      output logic [2:0] s, output logic [31:0] d, output int n);
    @(negedge clk); ms = m; rd = r; ad_m = r ? 32'h0 : w; ds_i = 1'b1;
    n = 0;
    while (!dk && n < 100) begin @(posedge clk); #1; n++; end
    s = ss; d = ad_bus;
    check(dk, "DK(u) returned");
    @(negedge clk); ds_i = 1'b0; ad_m = '0;
    @(posedge clk); #1;
    check(!dk, "DK(d) follows DS(d)");
    check(!ad_oe, "AD released after the data cycle");
  endtask

  initial begin
    bit got; int n;
    logic [2:0] s; logic [31:0] d;
    clr = 1'b1; as_i = 1'b0; ds_i = 1'b0; rd = 1'b0; ms = 2'd0; ad_m = '0;
    cyc(2); clr = 1'b0; cyc(2);

    // --- select at 255, local format
    address(32'h0000_00FF, 2'd1, got, n);
    check(got, "selected at 000000FF in CSR space");
    check(n == T_DTAS + 1, $sformatf("AK delay (got %0d)", n));
    // read CSR#0 (NTA = 0 after clear)
    data(2'd0, 1'b1, 0, s, d, n);
    check(s == 3'd0 && d == {ID, 16'h0}, $sformatf("CSR#0 read %h ss=%0d", d, s));
    check(n >= T_DTDS + T_DTDK && n <= T_DTDS + T_DTDK + 3, $sformatf("DK delay (got %0d)", n));
    // write CSR#0: rejected
    data(2'd0, 1'b0, 32'hDEAD_BEEF, s, d, n);
    check(s == 3'd6, "write to CSR#0 rejected");
    data(2'd0, 1'b1, 0, s, d, n);
    check(d == {ID, 16'h0}, "CSR#0 unchanged");
    // secondary address: NTA = 3, read back
    data(2'd2, 1'b0, 32'h3, s, d, n);
    check(s == 3'd0, "NTA = 3 accepted");
    data(2'd2, 1'b1, 0, s, d, n);
    check(s == 3'd0 && d == 32'h3, $sformatf("NTA read back %h", d));
    // CSR#3 write and read
    data(2'd0, 1'b0, 32'h0000_005A, s, d, n);
    check(s == 3'd0, "CSR#3 write accepted");
    check(gp == 8'h5A, "GP taken from CSR#3");
    data(2'd0, 1'b1, 0, s, d, n);
    check(s == 3'd0 && d == 32'h5A, $sformatf("CSR#3 read %h", d));
    // invalid NTA values
    data(2'd2, 1'b0, 32'h1, s, d, n);
    check(s == 3'd6, "NTA = 1 rejected");
    data(2'd0, 1'b1, 0, s, d, n);
    check(s == 3'd6, "random cycle with NTA = 1 rejected");
    data(2'd2, 1'b0, 32'h2, s, d, n);
    check(s == 3'd6, "NTA = 2 rejected");
    data(2'd2, 1'b0, 32'h7, s, d, n);
    check(s == 3'd6, "NTA with AD<31:2> /= 0 rejected");
    data(2'd2, 1'b0, 32'h0, s, d, n);
    check(s == 3'd0, "NTA = 0 accepted");
    // unsupported MS codes in the data cycle
    data(2'd1, 1'b1, 0, s, d, n);
    check(s == 3'd6, "block transfer rejected");
    data(2'd3, 1'b0, 32'h0, s, d, n);
    check(s == 3'd6, "MS = 3 rejected");
    data(2'd0, 1'b1, 0, s, d, n);
    check(s == 3'd0 && d == {ID, 16'h0}, "CSR#0 again after errors");
    release_bus();

    // --- global format with the new GP
    address(32'h5A00_00FF, 2'd1, got, n);
    check(got, "selected at GP 00 00FF");
    data(2'd2, 1'b0, 32'h3, s, d, n);
    data(2'd0, 1'b1, 0, s, d, n);
    check(d == 32'h5A, "CSR#3 through global address");
    release_bus();
    address(32'h5A00_00FF, 2'd0, got, n);
    check(!got, "not selected in data space");
    release_bus();
    address(32'h0000_00FE, 2'd1, got, n);
    check(!got, "not selected at 254");
    release_bus();
    address(32'h5B00_00FF, 2'd1, got, n);
    check(!got, "not selected with foreign GP");
    release_bus();

    // --- clear resets CSR#3 and NTA
    clr = 1'b1; cyc(1); clr = 1'b0;
    check(gp == '0, "clear resets CSR#3");
    address(32'h0000_00FF, 2'd1, got, n);
    data(2'd0, 1'b1, 0, s, d, n);
    check(d == {ID, 16'h0}, "clear resets NTA");
    release_bus();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
