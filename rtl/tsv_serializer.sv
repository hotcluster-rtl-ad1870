// tsv_serializer: transmit side of one router's vertical link.
//
// Takes a 44-bit flit from the router's up port and sends it in beats over
// the lanes of the current link mode:
//   MODE_NORMAL   one beat, chunk i on lane i
//   MODE_VIRTUAL  one beat like normal, but only once every neighbour we
//                 lent a cluster to has granted it back for this beat
//   MODE_SERIAL2  two beats, chunks {0,1} then {2,3} on lanes 0 and 1
//   MODE_SERIAL4  four beats, chunk i on lane 0 in beat i
//   MODE_DISABLED nothing is sent; the router must route around the link
// Chunk i is flit[11*i +: 11]. A beat is sent only when the receiver gives Go
// (rx_ready); flit_ready is high in the last beat of a flit, so the flit is
// held by the router until then (valid/ready form of Stall-Go).
//
// Virtual TSV: a lender in virtual mode raises vreq_out towards its borrowers
// while it has a flit. As a borrower, this block grants (vgnt_out) between
// flits when it has nothing to send, or when the lender was refused in the
// previous cycle, and does not send in a cycle in which it grants. The beat
// counter clears while en is low (mapping in progress). The modes are the
// paper's; the beat order, handshake and fairness rule are this design's.
module tsv_serializer
  import hc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  link_mode_e           mode,
  input  logic [3:0]           virt_dirs,
  input  logic [FLIT_W-1:0]    flit,
  input  logic                 flit_valid,
  output logic                 flit_ready,
  input  logic                 rx_ready,
  output chunk_t [NCL-1:0]     lanes,
  output logic                 beat_valid,
  output logic [3:0]           vreq_out,
  input  logic [3:0]           vgnt_in,
  input  logic [3:0]           vreq_in,
  output logic [3:0]           vgnt_out
);

  logic [1:0] cnt_q;
  logic [1:0] last_beat;
  logic       prio_q;        // a lender was refused last cycle
  logic       have_gnt;
  chunk_t [NCL-1:0] chunks;

  assign chunks = flit;

  always_comb begin
    unique case (mode)
      MODE_SERIAL2: last_beat = 2'd1;
      MODE_SERIAL4: last_beat = 2'd3;
      default:      last_beat = 2'd0;
    endcase
    vgnt_out = vreq_in & {4{en && cnt_q == 2'd0 && (!flit_valid || prio_q)}};
    vreq_out = virt_dirs & {4{en && flit_valid && mode == MODE_VIRTUAL}};
    have_gnt = (mode != MODE_VIRTUAL) || ((vgnt_in | ~virt_dirs) == 4'hF);
    beat_valid = en && flit_valid && rx_ready && have_gnt && (vgnt_out == 4'h0) &&
                 (mode != MODE_DISABLED);
    flit_ready = beat_valid && (cnt_q == last_beat);

    lanes = '0;
    unique case (mode)
      MODE_SERIAL2: begin
        lanes[0] = chunks[{cnt_q[0], 1'b0}];
        lanes[1] = chunks[{cnt_q[0], 1'b1}];
      end
      MODE_SERIAL4: lanes[0] = chunks[cnt_q];
      MODE_DISABLED: lanes = '0;
      default:      lanes = chunks;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      prio_q <= 1'b0;
    end else if (!en) begin
      cnt_q  <= '0;
      prio_q <= 1'b0;
    end else begin
      prio_q <= |(vreq_in & ~vgnt_out);
      if (beat_valid)
        cnt_q <= (cnt_q == last_beat) ? 2'd0 : cnt_q + 2'd1;
    end
  end

endmodule
