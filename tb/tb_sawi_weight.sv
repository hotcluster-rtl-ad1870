// tb_sawi_weight: checks SAWI weights for every healthy-cluster count 0..5.
// Reference: a router needs 4 clusters, so weight = 4 - max(0, healthy - 4).
module tb_sawi_weight;
  logic [2:0] healthy;
  logic [4:0] weight;
  int checks = 0, failures = 0;

  sawi_weight #(.WW(5)) dut (.healthy, .weight);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_w;
    for (int h = 0; h <= 5; h++) begin
      healthy = 3'(h);
      #1;
      exp_w = (h > 4) ? 4 - (h - 4) : 4;
      checks++;
      if (int'(weight) != exp_w) begin
        failures++;
        $display("healthy=%0d weight=%0d expected %0d", h, weight, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
