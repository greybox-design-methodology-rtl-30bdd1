// tb_dco: sets several coarse/fine codes and checks the oscillator period
// against f = 30 MHz + coarse*30 MHz + fine*0.3 MHz, the duty cycle and the
// spacing of all 22 phases (phase k lags phase 0 by k*T/22).
module tb_dco;
  import greybox_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [5:0] coarse;
  logic [6:0] fine;
  logic [21:0] ph;

  dco dut (.coarse(coarse), .fine(fine), .phases(ph));

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic run(input int c, input int f);
    realtime t0, t1, tf, tk;
    real tx;
    coarse = 6'(c); fine = 7'(f);
    tx = 1.0e6 / (30.0 + 30.0 * c + 0.3 * f);
    repeat (3) @(posedge ph[0]);
    t0 = $realtime;
    @(negedge ph[0]); tf = $realtime;
    @(posedge ph[0]); t1 = $realtime;
    checks++;
    if (!near(t1 - t0, tx, 0.05)) begin
      failures++; $display("FAIL c=%0d f=%0d period %f expected %f", c, f, t1 - t0, tx);
    end
    checks++;
    if (!near(tf - t0, tx / 2.0, 0.05)) begin
      failures++; $display("FAIL c=%0d f=%0d high %f expected %f", c, f, tf - t0, tx / 2.0);
    end
    for (int k = 1; k < 22; k++) begin
      @(posedge ph[k]); tk = $realtime;
      checks++;
      if (!near(tk - t1, k * tx / 22.0, 0.05)) begin
        failures++; $display("FAIL c=%0d f=%0d phase %0d at %f expected %f", c, f, k, tk - t1, k * tx / 22.0);
      end
      @(posedge ph[0]); t1 = $realtime;
    end
  endtask

  initial begin
    run(24, 0);     // 750 MHz
    run(23, 100);   // 750 MHz through the fine bank
    run(0, 0);      // 30 MHz, bottom of range
    run(63, 127);   // top of range
    run(10, 37);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
