// tb_sensor_mux: self-checking testbench of the FPU operand multiplexer.
// For every select code and random data, checks that code 0 passes the
// register-file word, codes 1..5 the sign-extended sensor, others zero.
module tb_sensor_mux;
  import fpp_pkg::*;
  logic [SEL_W-1:0] sel;
  logic [DW-1:0]    rf_a, y, exp_y;
  logic [FIX_W-1:0] sensor_data [5];
  int checks = 0, failures = 0;

  sensor_mux #(.N_SENSORS(5)) dut (.sel, .rf_a, .sensor_data, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      rf_a = {$urandom, $urandom};
      foreach (sensor_data[k]) sensor_data[k] = $urandom;
      sel = SEL_W'(i % 8);
      #1;
      if (sel == 0) exp_y = rf_a;
      else if (sel <= 5) exp_y = 64'(signed'(sensor_data[sel - 1]));
      else exp_y = '0;
      checks++;
      if (y !== exp_y) begin failures++; $display("FAIL sel %0d y %h expected %h", sel, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
