// tsv_deserializer: receive side of one router's vertical link.
//
// Collects the beats sent by tsv_serializer in the same link mode (one beat
// in normal and virtual mode, two in 2:1, four in 4:1 serial mode) and
// rebuilds the 44-bit flit, chunk i = flit[11*i +: 11]. The complete flit is
// held in a one-flit output register towards the upper router's down input
// (flit_valid/flit_ready). rx_ready, the Go signal back to the sender, is high
// while that register is empty or being emptied in the same cycle, so the
// sender can complete a flit without overflow. The beat counter clears while
// en is low. The one-flit output register is this design's choice.
module tsv_deserializer
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  link_mode_e           mode,
  input  chunk_t [NCL-1:0]     lanes,
  input  logic                 beat_valid,
  output logic                 rx_ready,
  output logic [FLIT_W-1:0]    flit,
  output logic                 flit_valid,
  input  logic                 flit_ready
);

  logic [1:0]        cnt_q;
  logic [1:0]        last_beat;
  chunk_t [NCL-1:0]  asm_q;     // chunks received so far
  chunk_t [NCL-1:0]  asm_d;

  always_comb begin
    unique case (mode)
      MODE_SERIAL2: last_beat = 2'd1;
      MODE_SERIAL4: last_beat = 2'd3;
      default:      last_beat = 2'd0;
    endcase
    rx_ready = !flit_valid || flit_ready;
    asm_d = asm_q;
    unique case (mode)
      MODE_SERIAL2: begin
        asm_d[{cnt_q[0], 1'b0}] = lanes[0];
        asm_d[{cnt_q[0], 1'b1}] = lanes[1];
      end
      MODE_SERIAL4: asm_d[cnt_q] = lanes[0];
      default:      asm_d = lanes;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      asm_q      <= '0;
      flit       <= '0;
      flit_valid <= 1'b0;
    end else begin
      if (flit_ready) flit_valid <= 1'b0;
      if (!en) begin
        cnt_q <= '0;
      end else if (beat_valid) begin
        asm_q <= asm_d;
        if (cnt_q == last_beat) begin
          cnt_q      <= '0;
          flit       <= asm_d;
          flit_valid <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 2'd1;
        end
      end
    end
  end

endmodule
