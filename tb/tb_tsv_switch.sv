// tb_tsv_switch: tx and rx cluster switches back to back. cluster_map builds
// the maps from random faults and borrow/lend decisions; the TSVs are ideal
// except that defective clusters read 0, and the neighbour faithfully
// carries borrowed lanes (borrow_in = borrow_out). Checks: every lane held by
// the router arrives intact (so no lane rides a defective cluster), virtual
// lanes arrive in the router's own beats, and data a neighbour sends on a lent
// cluster is forwarded to it intact when the router is not sending.
module tb_tsv_switch;
  import hc_pkg::*;
  logic [NPHY-1:0]      fault;
  logic                 red_present;
  logic [3:0]           borrow_from, lend_to;
  lane_map_t [NCL-1:0]  lane_map;
  phys_map_t [NPHY-1:0] phys_map;
  logic [3:0][2:0]      lent_phys;
  logic [3:0]           virt_dirs;
  link_mode_e           mode;
  logic [2:0]           n_lanes;
  chunk_t [NCL-1:0]     lane_tx, lane_rx;
  logic                 beat_valid;
  chunk_t [3:0]         lend_in, borrow_out, borrow_in, lend_out;
  chunk_t [NPHY-1:0]    phys_tx, phys_rx;
  int checks = 0, failures = 0;
  int n_borrow_lanes = 0, n_virtual = 0, n_lent = 0;

  cluster_map   u_map (.fault, .red_present, .borrow_from, .lend_to, .lane_map, .phys_map,
                       .lent_phys, .virt_dirs, .mode, .n_lanes);
  tsv_tx_switch u_tx  (.lane_tx, .beat_valid, .lane_map, .phys_map, .lent_phys, .lend_in,
                       .phys_tx, .borrow_out);
  tsv_rx_switch u_rx  (.phys_rx, .borrow_in, .lane_map, .lent_phys, .lend_to, .lane_rx, .lend_out);

  always_comb begin
    for (int p = 0; p < NPHY; p++) phys_rx[p] = (fault[p] || (p == RED && !red_present)) ? '0 : phys_tx[p];
    borrow_in = borrow_out;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h;
    for (int n = 0; n < 3000; n++) begin
      fault       = NPHY'($urandom) & NPHY'($urandom);
      red_present = 1'($urandom);
      lend_to     = 4'($urandom) & 4'($urandom);
      borrow_from = 4'($urandom) & ~lend_to;
      h = 0;
      for (int p = 0; p < 4; p++) h += !fault[p];
      h += (red_present && !fault[RED]);
      if ($countones(lend_to) > h) continue;
      for (int l = 0; l < 4; l++) lane_tx[l] = chunk_t'($urandom) | 1;   // never all zero
      for (int d = 0; d < 4; d++) lend_in[d] = chunk_t'($urandom) | 1;
      beat_valid = 1'($urandom);
      #1;
      for (int l = 0; l < 4; l++) begin
        if (lane_map[l].src == SRC_OWN || lane_map[l].src == SRC_BORROW) begin
          checks++;
          if (lane_map[l].src == SRC_BORROW) n_borrow_lanes++;
          if (lane_rx[l] !== lane_tx[l]) begin
            failures++;
            $display("FAIL lane %0d src=%s: sent %h got %h", l, lane_map[l].src.name(), lane_tx[l], lane_rx[l]);
          end
        end else if (lane_map[l].src == SRC_VIRTUAL && beat_valid) begin
          checks++;
          n_virtual++;
          if (lane_rx[l] !== lane_tx[l]) begin
            failures++;
            $display("FAIL virtual lane %0d: sent %h got %h", l, lane_tx[l], lane_rx[l]);
          end
        end
      end
      for (int d = 0; d < 4; d++)
        if (lend_to[d] && !(virt_dirs[d] && beat_valid)) begin
          checks++;
          n_lent++;
          if (lend_out[d] !== lend_in[d]) begin
            failures++;
            $display("FAIL lent cluster to %0d: sent %h got %h", d, lend_in[d], lend_out[d]);
          end
        end
    end
    checks++;
    if (n_borrow_lanes == 0 || n_virtual == 0 || n_lent == 0) begin
      failures++;
      $display("FAIL coverage: borrow=%0d virtual=%0d lent=%0d", n_borrow_lanes, n_virtual, n_lent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
