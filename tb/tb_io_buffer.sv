// tb_io_buffer -- self-checking test of the shared Sin/TestRes pad buffer.
//
// The testbench plays the tester: it drives the pad only while the buffer's
// output is disabled, and releases it while oe = 1. Checks that the pad and
// d_in carry the tester's bit in input mode, and that the pad carries d_out in
// output mode, for all combinations of values.
module tb_io_buffer;

  wire  pad;
  logic oe, d_out, d_in;
  logic tb_drive, tb_val;
  int   checks = 0, failures = 0;

  io_buffer dut (.pad, .oe, .d_out, .d_in);

  assign pad = tb_drive ? tb_val : 1'bz;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      oe       = 1'($urandom);
      d_out    = 1'($urandom);
      tb_val   = 1'($urandom);
      tb_drive = ~oe;
      #5;
      checks++;
      if (oe) begin
        if (pad !== d_out || d_in !== d_out) begin
          failures++;
          $display("output mode: pad=%b d_in=%b expected %b", pad, d_in, d_out);
        end
      end else begin
        if (pad !== tb_val || d_in !== tb_val) begin
          failures++;
          $display("input mode: pad=%b d_in=%b expected %b", pad, d_in, tb_val);
        end
      end
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
