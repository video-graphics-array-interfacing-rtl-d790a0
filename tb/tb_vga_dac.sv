// tb_vga_dac: checks the resistor-ladder DAC model for all 16 codes.
//
// The expected voltage is computed by superposition, source by source:
// each driven-high bit contributes VOH * Rp / (R + Rp), where Rp is the
// parallel combination of the 75 ohm termination and the other three
// series resistors (all other sources are at 0 V). The testbench also
// requires 0 V at code 0, 0.69..0.73 V at code 15 (the 0.7 V video
// range), a rising voltage for every code step, and each step within
// 50 % of the average step.
`timescale 1ns/1ps
module tb_vga_dac;

  logic [3:0] code;
  real        v_out;
  int checks = 0, failures = 0;

  vga_dac dut (.code(code), .v_out(v_out));

  localparam real VOH = 3.3;
  real r [4] = '{4000.0, 2000.0, 1000.0, 510.0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (code %0d, v=%f)", what, code, v_out);
    end
  endtask

  function automatic real parallel_except(int k);
    real g;
    g = 1.0 / 75.0;
    for (int j = 0; j < 4; j++) if (j != k) g += 1.0 / r[j];
    return 1.0 / g;
  endfunction

  initial begin
    #1ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real expected, prev, step, avg, v15;
    prev = -1.0;
    avg = 0.0;
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      #10;
      expected = 0.0;
      for (int k = 0; k < 4; k++)
        if (c[k]) expected += VOH * parallel_except(k) / (r[k] + parallel_except(k));
      check((v_out - expected) < 1e-9 && (expected - v_out) < 1e-9, "superposition value");
      if (c == 0) check(v_out == 0.0, "0 V at code 0");
      if (c > 0) check(v_out > prev, "monotonic");
      prev = v_out;
    end
    v15 = v_out;
    check(v15 > 0.69 && v15 < 0.73, "full scale near 0.7 V");
    avg = v15 / 15.0;
    for (int c = 1; c < 16; c++) begin
      code = 4'(c - 1);
      #10 prev = v_out;
      code = 4'(c);
      #10 step = v_out - prev;
      check(step > 0.5 * avg && step < 1.5 * avg, "step size");
    end
    $display("full scale %f V, average step %f V", v15, avg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
