// tb_tsv_cluster: checks the TSV cluster model. A healthy cluster must deliver
// every random word unchanged after its delay; a defective one must read 0.
module tb_tsv_cluster;
  localparam int unsigned W = 11;
  logic [W-1:0] tx, rx;
  logic         defect;
  int checks = 0, failures = 0;

  tsv_cluster #(.W(W)) dut (.tx, .defect, .rx);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    defect = 1'b0;
    tx = '0;
    #5;
    for (int n = 0; n < 200; n++) begin
      tx     = W'($urandom);
      defect = ($urandom % 4) == 0;
      #5;
      checks++;
      if (rx !== (defect ? '0 : tx)) begin
        failures++;
        $display("mismatch tx=%h defect=%0d rx=%h", tx, defect, rx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
