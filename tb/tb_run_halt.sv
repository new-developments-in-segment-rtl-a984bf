// tb_run_halt: self-checking test of the run/halt control.
// A halt request must raise HALT_REQ (after the two-stage synchroniser) but
// BH and the AK hold only once no arbitration cycle is in progress and the
// bus is released (AS = AK = 0). Run must release BH and AK.
module tb_run_halt;
  logic clk = 1'b0;
  logic pwr_clr, halt_sw, ag, msp, as_i, ak_ext;
  logic halt_req, bh, ak_drv;
  logic ak_bus;
  int checks = 0, failures = 0;

  assign ak_bus = ak_ext | ak_drv;   // wired OR of the AK line

  run_halt dut (.clk(clk), .pwr_clr(pwr_clr), .halt_sw(halt_sw), .ag(ag), .msp(msp),
                .as_i(as_i), .ak_i(ak_bus), .halt_req(halt_req), .bh(bh), .ak_drv(ak_drv));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    pwr_clr = 1'b1; halt_sw = 1'b0; ag = 1'b0; msp = 1'b0; as_i = 1'b0; ak_ext = 1'b0;
    cyc(2); pwr_clr = 1'b0; cyc(3);
    check(!halt_req && !bh && !ak_drv, "running after power clear");
    // halt while an arbitration cycle and a bus lock are in progress
    ag = 1'b1; as_i = 1'b1; ak_ext = 1'b1;
    @(negedge clk); halt_sw = 1'b1;
    cyc(1); check(!halt_req, "synchroniser stage 1");
    cyc(1); check(halt_req, "halt request after two cycles");
    cyc(5); check(!bh && !ak_drv, "no halt while arbitration in progress");
    ag = 1'b0; msp = 1'b1; cyc(5);
    check(!bh, "no halt while mastership pending");
    msp = 1'b0; cyc(5);
    check(!bh, "no halt while master holds AS/AK");
    as_i = 1'b0; cyc(3);
    check(!bh, "no halt while AK held");
    ak_ext = 1'b0; cyc(1);
    check(bh && ak_drv, "bus halted once released");
    cyc(10); check(bh && ak_drv && ak_bus, "halt holds AK");
    @(negedge clk); halt_sw = 1'b0;
    cyc(3);
    check(!halt_req && !bh && !ak_drv, "run releases BH and AK");
    // halt on an idle bus takes effect right after synchronisation
    @(negedge clk); halt_sw = 1'b1; cyc(3);
    check(bh, "halt on idle bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
