// tb_pcb_net: exhaustive test of the PCB interconnect model.  An intact net
// must hand each end's drive to the other end; an open one must leave both
// ends floating.  Contention (both ends driving) is not applied.
module tb_pcb_net;
  import bist_pkg::*;

  logic open_defect;
  pin_t a_drv, b_drv, a_lvl, b_lvl;
  int checks = 0, failures = 0;

  pcb_net dut (.open_defect, .a_drv, .b_drv, .a_lvl, .b_lvl);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int o = 0; o < 2; o++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          if (a[1] && b[1]) continue;          // both driving: not allowed
          open_defect = o[0]; a_drv = pin_t'(a[1:0]); b_drv = pin_t'(b[1:0]);
          #1ns;
          if (open_defect) begin
            check(!a_lvl.drv && !b_lvl.drv, "open net leaves both ends floating");
          end else begin
            check(b_lvl.drv == a_drv.drv && (!a_drv.drv || b_lvl.val == a_drv.val), "x drives y");
            check(a_lvl.drv == b_drv.drv && (!b_drv.drv || a_lvl.val == b_drv.val), "y drives x");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
