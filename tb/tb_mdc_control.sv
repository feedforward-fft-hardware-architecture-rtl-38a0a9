// tb_mdc_control: random in_valid pattern; 'beat' must count accepted beats
// modulo 8, out_valid must pulse the cycle after a beat once 12 beats have
// been accepted (and never before), and out_beat must equal
// (accepted beats - 12) mod 8.
module tb_mdc_control;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0] beat, out_beat;
  logic out_valid;
  int checks = 0, failures = 0;
  int accepted = 0;
  logic prev_valid = 0;
  int pulses = 0;

  mdc_control #(.FRAME(8), .LATENCY(12)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (beat != 3'(accepted % 8)) begin
        failures++;
        if (failures < 10) $display("FAIL: beat %0d after %0d beats", beat, accepted);
      end
      checks++;
      if (out_valid != (prev_valid && accepted >= 12)) begin
        failures++;
        if (failures < 10) $display("FAIL: out_valid=%b after %0d beats", out_valid, accepted);
      end
      if (out_valid) begin
        pulses++;
        checks++;
        if (out_beat != 3'((accepted - 12) % 8)) begin
          failures++;
          if (failures < 10) $display("FAIL: out_beat %0d after %0d beats", out_beat, accepted);
        end
      end
      prev_valid <= in_valid;
      if (in_valid) accepted++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL: no out_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
