// tb_wallace_tree: random rows for trees of 2 to 9 rows; sum + carry must
// equal the sum of all rows modulo 2^W.
module tb_wallace_tree;
  localparam int W = 24;
  int checks = 0, failures = 0;

  for (genvar R = 2; R <= 9; R++) begin : g_r
    logic [W-1:0] rows [R];
    logic [W-1:0] sum, carry;
    wallace_tree #(.ROWS(R), .W(W)) dut (.rows(rows), .sum(sum), .carry(carry));

    initial begin
      #(R * 1000);
      for (int n = 0; n < 200; n++) begin
        logic [W-1:0] ref_sum;
        ref_sum = '0;
        for (int i = 0; i < R; i++) begin
          rows[i] = (n == 0) ? '1 : W'($urandom);
          ref_sum += rows[i];
        end
        #1;
        checks++;
        if (W'(sum + carry) != ref_sum) begin
          failures++;
          if (failures < 10) $display("FAIL: rows=%0d sum+carry=%h expected %h", R, W'(sum + carry), ref_sum);
        end
      end
    end
  end

  initial begin
    #20000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
