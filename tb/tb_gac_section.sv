// tb_gac_section: self-checking test of the GAC section as a whole.
// The segment base address written into CSR#3 through the section's own
// slave must immediately change which global geographical addresses raise
// EG and at which global address the slave itself answers; the segment
// clear must return GP to 0. Local-format addresses work throughout.
module tb_gac_section;
  localparam int unsigned GP_W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic seg_clr, as_i, ds_i, rd, m_ak;
  logic [1:0] ms;
  logic [31:0] m_ad, ad_bus, ad_o;
  logic eg, ak_o, dk_o, ad_oe, ega, sel, ak_bus;
  logic [2:0] ss;
  logic [GP_W-1:0] gp;
  assign ak_bus = m_ak | ak_o;
  assign ad_bus = m_ad | (ad_oe ? ad_o : 32'h0);
  int checks = 0, failures = 0;

  gac_section #(.GP_W(GP_W), .T_DTAS(2), .T_DTDS(2), .T_DTDK(2)) dut (
    .clk(clk), .seg_clr(seg_clr), .as_i(as_i), .ak_i(ak_bus), .ds_i(ds_i), .dk_i(dk_o),
    .ms_i(ms), .rd_i(rd), .ad_i(ad_bus), .eg_o(eg), .ak_o(ak_o), .dk_o(dk_o), .ss_o(ss),
    .ad_o(ad_o), .ad_oe(ad_oe), .ega(ega), .sel(sel), .gp(gp));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Address cycle; reports EG and the section's own AK after settling.
  task automatic probe(input logic [31:0] a, input logic [1:0] m, output bit e, output bit k);
    @(negedge clk); m_ad = a; ms = m; as_i = 1;
    cyc(6);
    e = eg; k = ak_o;
    @(negedge clk); as_i = 0; m_ad = '0;
    cyc(2);
  endtask

  task automatic write(input logic [1:0] m, input logic [31:0] w);
    int n = 0;
    @(negedge clk); ms = m; rd = 0; m_ad = w; ds_i = 1;
    while (!dk_o && n < 50) begin @(posedge clk); #1; n++; end
    check(dk_o && ss == 3'd0, "write accepted");
    @(negedge clk); ds_i = 0; m_ad = '0;
    cyc(2);
  endtask

  task automatic set_gp(input logic [31:0] slave_addr, input logic [GP_W-1:0] v);
    @(negedge clk); m_ad = slave_addr; ms = 2'd1; as_i = 1;
    cyc(6);
    check(ak_o && sel, "own slave selected");
    @(negedge clk); m_ad = '0;
    write(2'd2, 32'h3);
    write(2'd0, 32'(v));
    @(negedge clk); as_i = 0;
    cyc(2);
  endtask

  initial begin
    bit e, k;
    seg_clr = 1; as_i = 0; ds_i = 0; rd = 0; m_ak = 0; ms = '0; m_ad = '0;
    cyc(2); seg_clr = 0; cyc(1);
    probe(32'h3C00_0004, 2'd0, e, k);
    check(!e, "global address with GP = 3C before it is set");
    probe(32'h0000_0004, 2'd0, e, k);
    check(e && !k, "local address raises EG");
    set_gp(32'h0000_00FF, 8'h3C);
    check(gp == 8'h3C, "GP written");
    probe(32'h3C00_0004, 2'd0, e, k);
    check(e, "global address with the new GP raises EG");
    probe(32'h3D00_0004, 2'd1, e, k);
    check(!e, "other segment's GP ignored");
    probe(32'h3C00_00FF, 2'd1, e, k);
    check(!e && k, "own slave at the global address 255, no EG");
    set_gp(32'h3C00_00FF, 8'h42);
    probe(32'h4200_0010, 2'd1, e, k);
    check(e, "GP rewritten through the global address");
    probe(32'h3C00_0004, 2'd0, e, k);
    check(!e, "old GP no longer recognised");
    @(negedge clk); seg_clr = 1; cyc(1); seg_clr = 0;
    check(gp == '0, "segment clear resets GP");
    probe(32'h4200_0010, 2'd1, e, k);
    check(!e, "cleared GP no longer recognised");
    probe(32'h0000_0010, 2'd1, e, k);
    check(e, "local address after clear");
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
