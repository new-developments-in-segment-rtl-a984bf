// tb_eg_gen: self-checking test of the EG generator.
// Runs address cycles with local and global geographical addresses, the
// reserved address 255, foreign segment bases, non-zero filler bits and
// broadcast MS codes, plus random addresses. The expected EG is computed by
// a reference function; EG must rise T_DTAS + 1 cycles after AS(u) and fall
// one cycle after AK(u) or AS(d).
module tb_eg_gen;
  localparam int unsigned GP_W = 8, T_DTAS = 3;
  logic clk = 1'b0;
  logic clr, as_i, ak;
  logic [1:0] ms;
  logic [31:0] ad;
  logic [GP_W-1:0] gp;
  logic ega, eg;
  int checks = 0, failures = 0;

  eg_gen #(.GP_W(GP_W), .T_DTAS(T_DTAS)) dut (.clk(clk), .clr(clr), .as_i(as_i), .ak_i(ak),
    .ms_i(ms), .ad_i(ad), .gp(gp), .ega(ega), .eg(eg));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  function automatic bit ref_eg(logic [31:0] a, logic [1:0] m, logic [GP_W-1:0] g);
    bit fmt_local  = (a[31:8] == 24'h0);
    bit fmt_global = (a[31:24] == g) && (a[23:8] == 16'h0);
    return (a[7:0] != 8'hFF) && (fmt_local || fmt_global) && (m <= 2'd1);
  endfunction

  // One address cycle; the answering module raises AK ak_after cycles after EG.
  task automatic addr_cycle(input logic [31:0] a, input logic [1:0] m, input int ak_after);
    int n;
    bit exp;
    exp = ref_eg(a, m, gp);
    @(negedge clk); ad = a; ms = m; as_i = 1'b1;
    n = 0;
    while (!eg && n < T_DTAS + 6) begin @(posedge clk); #1; n++; end
    check(eg == exp, $sformatf("EG for %h ms=%0d expected %0d", a, m, exp));
    if (exp) begin
      check(n == T_DTAS + 1, $sformatf("EG delay (got %0d)", n));
      check(ega, "EGA decode");
      if (ak_after >= 0) begin
        cyc(ak_after);
        @(negedge clk); ak = 1'b1;
        @(posedge clk); #1;
        check(!eg, "EG falls at AK(u)");
        cyc(3);
        check(!eg, "EG stays low while AK held");
      end else begin
        cyc(4);
        check(eg, "EG held during address cycle");
      end
    end
    @(negedge clk); as_i = 1'b0;
    @(posedge clk); #1;
    check(!eg, "EG low after AS(d)");
    @(negedge clk); ak = 1'b0;
    cyc(2);
  endtask

  initial begin
    clr = 1'b1; as_i = 1'b0; ak = 1'b0; ms = 2'd0; ad = '0; gp = 8'h5A;
    cyc(2); clr = 1'b0; cyc(1);
    addr_cycle(32'h0000_0007, 2'd0, 2);
    addr_cycle(32'h5A00_0003, 2'd1, 0);
    addr_cycle(32'h0000_00FF, 2'd1, 2);
    addr_cycle(32'h5A00_00FF, 2'd0, 2);
    addr_cycle(32'h5B00_0003, 2'd0, 2);
    addr_cycle(32'h5A01_0003, 2'd0, 2);
    addr_cycle(32'h0000_0103, 2'd0, 2);
    addr_cycle(32'h0000_0004, 2'd2, 2);
    addr_cycle(32'h0000_0004, 2'd3, 2);
    addr_cycle(32'h0000_0011, 2'd0, -1);
    gp = 8'h01;
    addr_cycle(32'h0100_001F, 2'd1, 1);
    addr_cycle(32'h5A00_0003, 2'd1, 1);
    for (int i = 0; i < 40; i++) begin
      logic [31:0] a;
      a = $urandom;
      case (i % 4)
        0: a[31:8] = 24'h0;
        1: a[31:8] = {gp, 16'h0};
        2: a[23:8] = 16'h0;
        default: ;
      endcase
      addr_cycle(a, 2'($urandom_range(0, 3)), 1);
    end
    // clear drops EG
    @(negedge clk); ad = 32'h0000_0002; ms = 2'd0; as_i = 1'b1;
    cyc(T_DTAS + 3);
    check(eg, "EG up before clear");
    clr = 1'b1; cyc(1); clr = 1'b0;
    check(!eg, "clear drops EG");
    as_i = 1'b0;
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
