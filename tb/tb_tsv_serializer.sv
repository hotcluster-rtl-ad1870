// tb_tsv_serializer: drives random flits in every link mode and checks the
// beats: lane contents (chunk i = flit[11i +: 11], 4 chunks in one beat, two
// per beat over two beats, one per beat over four beats), the number of beats
// and cycles per flit with the receiver always ready, that nothing is sent
// while Go is low or the link is disabled, and the virtual-TSV handshake on
// both sides (a lender waits for its grant; a borrower grants when idle or
// after having refused once, and never sends in a cycle it grants).
module tb_tsv_serializer;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0, en;
  link_mode_e mode;
  logic [3:0] virt_dirs, vreq_out, vgnt_in, vreq_in, vgnt_out;
  logic [FLIT_W-1:0] flit;
  logic flit_valid, flit_ready, rx_ready, beat_valid;
  chunk_t [NCL-1:0] lanes;
  int checks = 0, failures = 0;

  tsv_serializer dut (.*);

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

  // send one flit in mode m with Go always high; check beats and cycle count
  task automatic send_one(input link_mode_e m);
    int nb, beats, cycles;
    chunk_t [NCL-1:0] ch;
    nb = (m == MODE_SERIAL2) ? 2 : (m == MODE_SERIAL4) ? 4 : 1;
    mode = m;
    flit = {$urandom, $urandom};
    ch = flit;
    flit_valid = 1'b1;
    beats = 0;
    cycles = 0;
    do begin
      #1;
      cycles++;
      if (beat_valid) begin
        if (m == MODE_SERIAL2) begin
          check(lanes[0] == ch[2*beats] && lanes[1] == ch[2*beats+1] && lanes[2] == '0, "serial2 lanes");
        end else if (m == MODE_SERIAL4) begin
          check(lanes[0] == ch[beats] && lanes[1] == '0, "serial4 lane");
        end else begin
          check(lanes == ch, "parallel lanes");
        end
        check(flit_ready == (beats == nb - 1), "flit_ready on last beat only");
        beats++;
      end
      @(negedge clk);
    end while (beats < nb && cycles < 20);
    check(beats == nb && cycles == nb, "beats and cycles per flit");
    flit_valid = 1'b0;
  endtask

  initial begin
    int stall_cycles;
    en = 1; mode = MODE_NORMAL; virt_dirs = '0; vgnt_in = '0; vreq_in = '0;
    flit = '0; flit_valid = 0; rx_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      send_one(MODE_NORMAL);
      send_one(MODE_SERIAL2);
      send_one(MODE_SERIAL4);
    end
    // Stall-Go: nothing moves while rx_ready is low
    mode = MODE_SERIAL4; flit_valid = 1; rx_ready = 0;
    repeat (5) begin #1; check(!beat_valid && !flit_ready, "stalled while Go low"); @(negedge clk); end
    rx_ready = 1;
    flit_valid = 0;
    repeat (4) @(negedge clk);   // counter still at beat 0: nothing was sent
    // disabled link never sends
    mode = MODE_DISABLED; flit_valid = 1;
    repeat (4) begin #1; check(!beat_valid && !flit_ready, "disabled sends nothing"); @(negedge clk); end
    flit_valid = 0;
    // virtual mode as lender: waits for grant from direction 2
    mode = MODE_VIRTUAL; virt_dirs = 4'b0100; flit_valid = 1; vgnt_in = 0;
    stall_cycles = 0;
    repeat (3) begin
      #1; check(vreq_out == 4'b0100, "virtual request raised");
      check(!beat_valid, "lender waits for grant"); stall_cycles++; @(negedge clk);
    end
    vgnt_in = 4'b0100;
    #1; check(beat_valid && flit_ready, "lender sends with grant");
    @(negedge clk);
    flit_valid = 0; vgnt_in = 0; virt_dirs = 0;
    // as borrower: grant immediately when idle
    mode = MODE_NORMAL; vreq_in = 4'b0001;
    #1; check(vgnt_out == 4'b0001, "idle borrower grants");
    @(negedge clk);
    // busy borrower: refuses first, then grants and holds its own beat
    flit_valid = 1; flit = {$urandom, $urandom};
    #1; check(vgnt_out == 4'b0000 && beat_valid, "busy borrower sends first");
    @(negedge clk);
    #1; check(vgnt_out == 4'b0001 && !beat_valid, "borrower yields after one refusal");
    @(negedge clk);
    vreq_in = 0; flit_valid = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
