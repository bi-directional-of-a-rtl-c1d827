// tb_dir_buffer: exhaustive test of the IB and OB direction buffers.
//
// For both polarities (IB: pad is an output when TIS = H, OB: when TIS = L)
// every combination of TIS, pad level (driven L, driven H, floating) and
// inward value is applied, and the pad drive and the inward level are
// compared with the expected tristate behaviour.
module tb_dir_buffer;
  import bist_pkg::*;

  logic tis, from_core;
  pin_t pad_in;
  pin_t ib_pad_out, ib_to_core, ob_pad_out, ob_to_core;
  int checks = 0, failures = 0;

  dir_buffer #(.PAD_OUT_WHEN_TIS(1'b1)) u_ib (
    .tis, .pad_in, .pad_out(ib_pad_out), .to_core(ib_to_core), .from_core);
  dir_buffer #(.PAD_OUT_WHEN_TIS(1'b0)) u_ob (
    .tis, .pad_in, .pad_out(ob_pad_out), .to_core(ob_to_core), .from_core);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < 4; p++)
        for (int c = 0; c < 2; c++) begin
          tis = t[0]; pad_in = pin_t'(p[1:0]); from_core = c[0];
          #1ns;
          if (tis) begin    // IB drives its pad, OB receives
            check(ib_pad_out == '{1'b1, from_core}, "IB drives pad when TIS=H");
            check(ib_to_core.drv == 1'b0, "IB inward floats when TIS=H");
            check(ob_pad_out.drv == 1'b0, "OB releases pad when TIS=H");
            check(ob_to_core == pad_in, "OB passes pad inward when TIS=H");
          end else begin    // IB receives, OB drives
            check(ib_pad_out.drv == 1'b0, "IB releases pad when TIS=L");
            check(ib_to_core == pad_in, "IB passes pad inward when TIS=L");
            check(ob_pad_out == '{1'b1, from_core}, "OB drives pad when TIS=L");
            check(ob_to_core.drv == 1'b0, "OB inward floats when TIS=L");
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
