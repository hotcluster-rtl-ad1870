// tb_tsv_deserializer: drives beats in each link mode and checks the rebuilt
// flit, that the flit appears in the cycle after its last beat, that it is held
// while the consumer stalls (rx_ready low, Go withdrawn) and released on ready.
module tb_tsv_deserializer;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0, en;
  link_mode_e mode;
  chunk_t [NCL-1:0] lanes;
  logic beat_valid, rx_ready, flit_valid, flit_ready;
  logic [FLIT_W-1:0] flit;
  int checks = 0, failures = 0;

  tsv_deserializer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (mode %s)", what, $time, mode.name());
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic recv_one(input link_mode_e m, input bit stall);
    int nb;
    logic [FLIT_W-1:0] f;
    chunk_t [NCL-1:0] ch;
    nb = (m == MODE_SERIAL2) ? 2 : (m == MODE_SERIAL4) ? 4 : 1;
    mode = m;
    f = {$urandom, $urandom};
    ch = f;
    flit_ready = !stall;
    for (int b = 0; b < nb; b++) begin
      check(rx_ready, "ready before beat");
      lanes = '0;
      if (m == MODE_SERIAL2) begin lanes[0] = ch[2*b]; lanes[1] = ch[2*b+1]; end
      else if (m == MODE_SERIAL4) lanes[0] = ch[b];
      else lanes = ch;
      beat_valid = 1;
      @(negedge clk);
      beat_valid = 0;
      lanes = '1;
      if (b < nb - 1) check(!flit_valid || stall, "no flit before last beat");
    end
    check(flit_valid && flit == f, "flit rebuilt");
    if (stall) begin
      check(!rx_ready, "Go withdrawn while output full");
      repeat (3) begin @(negedge clk); check(flit_valid && flit == f, "flit held"); end
      flit_ready = 1;
      #1; check(rx_ready, "Go back when consumer takes flit");
      @(negedge clk);
      check(!flit_valid, "flit released");
    end else begin
      @(negedge clk);
      check(!flit_valid, "flit consumed");
    end
  endtask

  initial begin
    en = 1; mode = MODE_NORMAL; lanes = '0; beat_valid = 0; flit_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      recv_one(MODE_NORMAL, n % 5 == 0);
      recv_one(MODE_VIRTUAL, 0);
      recv_one(MODE_SERIAL2, n % 3 == 0);
      recv_one(MODE_SERIAL4, n % 4 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
