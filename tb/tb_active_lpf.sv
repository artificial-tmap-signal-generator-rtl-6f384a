// tb_active_lpf - check of the analog output models.
//
// A level shifter (0 / 3.3 V, the TMAP pin) drives a filter with a step; the
// output must follow -0.33 V * (1 - exp(-t / 470 us)) within 1 % of the final
// value at several times, and settle at -0.33 V. A +/-3.3 V level shifter is
// checked at both input levels, and a 50 % square wave at 1 MHz into a second
// filter must average to about 0 V (zero-mean noise).
module tb_active_lpf;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic b_pin = 1'b0, b_noise = 1'b0;
  real  v_pin, v_noise, y_pin, y_noise;

  level_shifter #(.VHIGH(3.3), .VLOW(0.0)) u_ls_pin (.din(b_pin), .vout(v_pin));
  level_shifter u_ls_noise (.din(b_noise), .vout(v_noise));
  active_lpf u_lpf_pin (.vin(v_pin), .vout(y_pin));
  active_lpf u_lpf_noise (.vin(v_noise), .vout(y_noise));

  always #500 b_noise = ~b_noise;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    real ideal, tau;
    tau = 10.0e3 * 47.0e-9;
    #1;
    check(v_pin == 0.0, "pin low = 0 V");
    b_pin = 1'b1;
    #1;
    check(v_pin == 3.3, "pin high = 3.3 V");
    for (int i = 1; i <= 8; i++) begin
      #(200us);
      ideal = -0.33 * (1.0 - $exp(-(i * 200.0e-6) / tau));
      check((y_pin - ideal) < 0.0033 && (ideal - y_pin) < 0.0033,
            $sformatf("step response %f vs %f", y_pin, ideal));
    end
    #(5ms);
    check(y_pin < -0.3267 && y_pin > -0.3333, "settles at gain -0.1");
    check(y_noise < 0.01 && y_noise > -0.01, $sformatf("square wave averages to 0 (%f)", y_noise));
    b_noise = 1'b0; #1; check(v_noise == -3.3, "noise shifter low = -VDD");
    b_noise = 1'b1; #1; check(v_noise == 3.3, "noise shifter high = +VDD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(50ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
