// tb_fuzzy_speed_ctrl: drives the speed controller with random speed
// references and measurements and answers its inference requests with a
// stand-in FIS (random output after a random delay, sometimes "no rule
// fired"). Checks the scaled error / change-of-error inputs, the voltage
// accumulator with saturation, the frequency command ref*POLE_PAIRS/6,
// overrun detection and clearing when disabled.
module tb_fuzzy_speed_ctrl;
  import fis_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               enable, sample, fis_load, fis_start, fis_done, fis_nofire, busy, overrun;
  logic signed [15:0] speed_ref, freq_dhz;
  logic [15:0]        speed_rpm;
  data_t              fis_in [4];
  data_t              fis_out;
  logic [7:0]         volt_cmd;

  fuzzy_speed_ctrl #(.NUM_INPUTS(4), .POLE_PAIRS(4), .E_SHIFT(2), .DE_SHIFT(1)) dut (.*);

  int checks = 0, failures = 0, overruns = 0, nofires = 0, sat_hi = 0, sat_lo = 0;
  int e_prev = 0, vacc = 0;

  function automatic int sat8(input int v);
    return (v < 0) ? 0 : (v > 255 ? 255 : v);
  endfunction

  // e >>> sh for negative values rounds toward minus infinity
  function automatic int asr(input int v, input int sh);
    return (v >= 0) ? (v >> sh) : -((-v + (1 << sh) - 1) >> sh);
  endfunction

  always @(posedge clk) if (rst_n && overrun) overruns++;

  task automatic step(input int refv, input int meas, input int outv, input bit nofire, input bit extra_sample);
    int e, de, d;
    @(negedge clk);
    speed_ref = 16'(refv); speed_rpm = 16'(meas);
    e = (refv < 0 ? -refv : refv) - meas;
    de = e - e_prev;
    sample = 1;
    #1;
    checks += 3;
    if (!fis_load || !fis_start) begin failures++; $display("FAIL no request"); end
    if (int'(fis_in[0]) != sat8(128 + asr(e, 2))) begin failures++; $display("FAIL in0 %0d e=%0d", fis_in[0], e); end
    if (int'(fis_in[1]) != sat8(128 + asr(de, 1))) begin failures++; $display("FAIL in1 %0d de=%0d", fis_in[1], de); end
    e_prev = e;
    @(negedge clk); sample = 0;
    d = 2 + $urandom % 30;
    repeat (d) @(negedge clk);
    if (extra_sample) begin sample = 1; @(negedge clk); sample = 0; @(negedge clk); end
    fis_out = 8'(outv); fis_nofire = nofire; fis_done = 1;
    @(negedge clk); fis_done = 0;
    if (!nofire) begin
      vacc += outv - 128;
      if (vacc > 4095) begin vacc = 4095; sat_hi++; end
      if (vacc < 0) begin vacc = 0; sat_lo++; end
    end else nofires++;
    checks += 2;
    if (int'(volt_cmd) != (vacc >> 4)) begin failures++; $display("FAIL volt %0d exp %0d", volt_cmd, vacc >> 4); end
    if (int'(freq_dhz) < (refv * 4) / 6 - 1 || int'(freq_dhz) > (refv * 4) / 6 + 1) begin
      failures++; $display("FAIL freq %0d for ref %0d", freq_dhz, refv);
    end
  endtask

  initial begin
    enable = 0; sample = 0; fis_done = 0; fis_nofire = 0; fis_out = 128; speed_ref = 0; speed_rpm = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    enable = 1;
    for (int t = 0; t < 40; t++) step(1500, 300 + 30 * t, 255, 0, t == 5);   // climb to saturation
    for (int t = 0; t < 300; t++)
      step(int'($urandom % 3001) - 1500, $urandom % 2000, $urandom % 256, ($urandom % 8) == 0, 0);
    for (int t = 0; t < 40; t++) step(-200, 400, 0, 0, 0);                   // pull down to zero
    // disable clears voltage and error memory
    @(negedge clk); enable = 0; @(negedge clk); enable = 1; vacc = 0; e_prev = 0;
    checks++; if (volt_cmd != 0) begin failures++; $display("FAIL not cleared"); end
    step(100, 0, 200, 0, 0);
    checks++;
    if (overruns == 0 || nofires == 0 || sat_hi == 0 || sat_lo == 0) begin
      failures++; $display("FAIL coverage ov=%0d nf=%0d hi=%0d lo=%0d", overruns, nofires, sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
