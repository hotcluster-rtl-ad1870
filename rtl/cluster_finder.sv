// cluster_finder: online, weight-based TSV cluster finding for one router
// (the hardware form of the paper's Algorithm 2).
//
// Every router needs four healthy clusters for its vertical link. Its own
// redundant cluster repairs the first fault internally. If faults remain, the
// router asks its neighbours for clusters, one neighbour at a time, always
// the lowest-weighted untried neighbour whose key {weight, id} is below its
// own. A neighbour that grants lends one of its own healthy clusters and may
// then fall short itself, so it asks its own lower-weighted neighbours in
// turn: a borrowing chain runs from hot (high weight) routers towards cool
// ones, as in the paper. Refused requests mark the neighbour as tried; when
// no candidate is left, the router settles with fewer than four clusters and
// cluster_map chooses virtual, serial or disabled operation.
//
// Interface: req_out/gnt_in go to/come from the neighbour in direction d,
// req_in/gnt_out the reverse. Requests and grants are combinational within a
// cycle; the borrow/lend registers update at the clock edge. A request
// refused only because the neighbour served another requester is repeated;
// one refused because the neighbour has nothing left (nbr_can_lend low) is
// not. start clears all
// state and restarts the search; the search also runs from reset. At most
// one cluster moves between two neighbours and never in both directions,
// one request and one grant per router per cycle. These rules, the tie-break
// by router id and the handshake itself are this design's choices.
module cluster_finder
  import hc_pkg::*;
#(
  parameter int unsigned KEY_W = KW   // width of the {weight, id} key
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NPHY-1:0]     fault,        // [3:0] original, [4] redundant
  input  logic                red_present,
  input  logic [KEY_W-1:0]       my_key,
  input  logic [3:0][KEY_W-1:0]  nbr_key,
  input  logic [3:0]          nbr_exist,
  input  logic [3:0]          req_in,
  output logic [3:0]          gnt_out,
  output logic [3:0]          req_out,
  input  logic [3:0]          gnt_in,
  input  logic [3:0]          nbr_can_lend, // neighbour still owns a cluster to lend
  output logic                can_lend,
  output logic [3:0]          borrow_from,
  output logic [3:0]          lend_to,
  output logic [2:0]          healthy       // healthy own clusters
);

  logic [3:0] tried_q;
  logic [3:0] cand;
  logic [3:0] eligible;
  logic [2:0] n_borrow, n_lend;
  logic [3:0] supply;
  logic       deficit;

  function automatic logic [2:0] popc4(input logic [3:0] v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

  always_comb begin
    healthy  = popc4(~fault[3:0]) + 3'(red_present && !fault[RED]);
    n_borrow = popc4(borrow_from);
    n_lend   = popc4(lend_to);
    supply   = 4'(healthy) + 4'(n_borrow) - 4'(n_lend);
    deficit  = supply < 4'd4;
    can_lend = healthy > n_lend;
  end

  // Request: lowest-keyed eligible neighbour below our own key.
  always_comb begin
    logic          found;
    logic [1:0]    best;
    for (int d = 0; d < 4; d++)
      cand[d] = nbr_exist[d] && !borrow_from[d] && !lend_to[d] && !tried_q[d] &&
                (nbr_key[d] < my_key);
    found = 1'b0;
    best  = '0;
    for (int d = 0; d < 4; d++)
      if (cand[d] && (!found || nbr_key[d] < nbr_key[best])) begin
        found = 1'b1;
        best  = 2'(d);
      end
    req_out = '0;
    if (deficit && found) req_out[best] = 1'b1;
  end

  // Grant: highest-keyed requester, if we still own a healthy cluster to lend.
  always_comb begin
    logic       found;
    logic [1:0] best;
    for (int d = 0; d < 4; d++)
      eligible[d] = req_in[d] && !lend_to[d] && !borrow_from[d];
    found = 1'b0;
    best  = '0;
    for (int d = 0; d < 4; d++)
      if (eligible[d] && (!found || nbr_key[d] > nbr_key[best])) begin
        found = 1'b1;
        best  = 2'(d);
      end
    gnt_out = '0;
    if (found && can_lend) gnt_out[best] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      borrow_from <= '0;
      lend_to     <= '0;
      tried_q     <= '0;
    end else if (start) begin
      borrow_from <= '0;
      lend_to     <= '0;
      tried_q     <= '0;
    end else begin
      borrow_from <= borrow_from | (req_out & gnt_in);
      tried_q     <= tried_q | (req_out & ~gnt_in & ~nbr_can_lend);
      lend_to     <= lend_to | gnt_out;
    end
  end

endmodule
