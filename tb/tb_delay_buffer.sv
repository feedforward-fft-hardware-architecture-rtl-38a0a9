// tb_delay_buffer: feeds numbered words with random idle cycles (en low);
// each output must be the word accepted exactly L accepted words earlier.
module tb_delay_buffer;
  localparam int W = 12, L = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  delay_buffer #(.W(W), .L(L)) dut (.*);
  always #5 clk = ~clk;

  logic [W-1:0] hist [$];

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (q != 0) begin failures++; $display("FAIL: not reset"); end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      d = W'($urandom);
      if (en) begin
        checks++;
        if (hist.size() >= L) begin
          if (q != hist[hist.size() - L]) begin
            failures++;
            if (failures < 10) $display("FAIL: q=%h expected %h", q, hist[hist.size() - L]);
          end
        end else if (q != 0) begin
          failures++;
          $display("FAIL: q=%h before fill", q);
        end
        hist.push_back(d);
      end
    end
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
