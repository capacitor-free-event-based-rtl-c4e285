// tb_flash_sar_ctrl: self-checking test of the Flash-SAR ADC sequencer.
// An ideal analog front end holds random input voltages (including values
// below zero and above full scale); every result is compared with
// floor(Vheld / LSB) clamped to 0..255, and the spacing between `valid` pulses
// must be exactly 10 clocks (5 MS/s at a 50 MHz clock). Now and then `restart`
// is pulsed at a random point of a conversion: that conversion must produce no
// result and the next result must come 10 clocks after the restart edge.
`timescale 1ns/1ps
module tb_flash_sar_ctrl;
  localparam int unsigned BITS = 8;
  localparam real FS = 1.2;
  localparam int unsigned N_CONV = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample, cmp, valid, restart = 1'b0;
  logic [2:0] flash_therm;
  logic [BITS-1:0] dac_code, data;
  real vin, vheld;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  flash_sar_ctrl dut (
    .clk(clk), .rst_n(rst_n), .restart(restart), .sample(sample), .flash_therm(flash_therm),
    .dac_code(dac_code), .cmp(cmp), .data(data), .valid(valid));

  adc_frontend_model #(.BITS(BITS), .FLASH_BITS(2), .FS(FS)) afe (
    .vin(vin), .sample(sample), .dac_code(dac_code),
    .flash_therm(flash_therm), .cmp(cmp), .vheld(vheld));

  int expected_q[$];

  function automatic int ideal_code(real v);
    int c;
    if (v <= 0.0) return 0;
    c = int'($floor(v / (FS / 256.0)));
    if (c > 255) c = 255;
    return c;
  endfunction

  // New random input every clock; the expectation is taken at the hold instant.
  always @(posedge clk) vin <= -0.05 + 1.3 * real'($urandom_range(0, 100000)) / 100000.0;
  always @(negedge sample) if (rst_n) expected_q.push_back(ideal_code(vin));

  int cyc = 0, last_valid = -1, n_res = 0, n_restart = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid && rst_n) begin
      checks++;
      if (expected_q.size() == 0) begin
        failures++; $display("FAIL: result with no sample");
      end else begin
        int exp_c;
        exp_c = expected_q.pop_front();
        if (int'(data) != exp_c) begin
          failures++;
          $display("FAIL: data=%0d expected=%0d", data, exp_c);
        end
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 10) begin
          failures++; $display("FAIL: valid spacing %0d clocks", cyc - last_valid);
        end
      end
      last_valid = cyc;
      n_res++;
    end
    // A restart seen on this edge drops the conversion in progress; the next
    // `valid` is set 10 edges later and seen here on the 11th.
    if (restart) begin
      expected_q.delete();
      last_valid = cyc + 1;
      n_restart++;
    end
  end

  initial begin
    vin = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (N_CONV) begin
      repeat ($urandom_range(8, 40)) @(posedge clk);
      if ($urandom_range(0, 3) == 0) begin
        restart <= 1'b1;
        @(posedge clk);
        restart <= 1'b0;
      end
    end
    wait (n_res >= N_CONV);
    checks++;
    if (n_restart == 0) begin failures++; $display("FAIL: no restart tested"); end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 50 * (N_CONV + 20));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
