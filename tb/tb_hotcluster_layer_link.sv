// tb_hotcluster_layer_link: end-to-end test of a 4x4 layer's vertical links
// at the top's default parameters (one redundant cluster per router).
//
// Three fault scenarios are mapped and then loaded with random traffic on
// every router's up port while the upper routers apply random backpressure:
//   1. online mapping with placement-flow weights: a router left without any
//      cluster (disabled), one with a single cluster (4:1 serial), one with two
//      (2:1 serial), a low-weight lender left with three (virtual TSV), a
//      router whose five clusters are all defective and borrows four, a
//      borrowing chain, and an internal repair;
//   2. an offline map supplied as a host would compute it (max-flow);
//   3. SAWI weights.
// Checks: expected link modes and borrow maps from the worked-out scenarios;
// for every router that borrow and lend maps agree between neighbours and
// that the mode follows from the cluster counts; every flit arrives intact
// and in order; the spacing of accepted flits is 1, 2 and 4 cycles in normal,
// 2:1 and 4:1 modes; disabled links accept nothing. Each mechanism is counted
// and one that never happened is a failure.
module tb_hotcluster_layer_link;
  import hc_pkg::*;
  localparam int R = 16;
  localparam int COLS = 4;
  localparam int NFLIT = 24;

  logic clk = 0, rst_n = 0;
  logic [R-1:0][FLIT_W-1:0] flit_in, flit_out;
  logic [R-1:0] flit_in_valid, flit_in_ready, flit_out_valid, flit_out_ready;
  logic [R-1:0][NPHY-1:0] tsv_fault;
  logic [R-1:0][3:0] ext_fault, off_borrow, borrow_map, lend_map;
  logic remap, offline, use_sawi, map_ready;
  logic [R-1:0][WW-1:0] cfg_weight;
  link_mode_e [R-1:0] link_mode;

  hotcluster_layer_link dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_flit_mode [5];
  int n_disabled = 0, n_borrow_edges = 0, n_chain = 0, n_internal = 0;
  int n_offline_flits = 0, n_sawi_flits = 0, n_stall = 0, n_virtual_wait = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic ----------------
  logic traffic_on = 0;
  int   sent [R];
  int   rcvd [R];
  int   last_acc [R];
  int   min_gap [R];
  logic [FLIT_W-1:0] expq [R][$];
  int   cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < R; i++) begin
      if (flit_in_valid[i] && flit_in_ready[i]) begin
        expq[i].push_back(flit_in[i]);
        sent[i] = sent[i] + 1;
        if (last_acc[i] >= 0 && (cyc - last_acc[i]) < min_gap[i]) min_gap[i] = cyc - last_acc[i];
        last_acc[i] = cyc;
        n_flit_mode[int'(link_mode[i])]++;
        if (offline)  n_offline_flits++;
        if (use_sawi) n_sawi_flits++;
        flit_in[i] <= {$urandom, $urandom};
      end
      if (link_mode[i] == MODE_VIRTUAL && flit_in_valid[i] && !flit_in_ready[i] && flit_out_ready[i])
        n_virtual_wait++;
      if (flit_out_valid[i] && !flit_out_ready[i]) n_stall++;
      if (flit_out_valid[i] && flit_out_ready[i]) begin
        checks++;
        if (expq[i].size() == 0) begin
          failures++;
          $display("FAIL router %0d: unexpected flit %h", i, flit_out[i]);
        end else begin
          logic [FLIT_W-1:0] e;
          e = expq[i].pop_front();
          if (e !== flit_out[i]) begin
            failures++;
            $display("FAIL router %0d mode %s: got %h expected %h", i, link_mode[i].name(), flit_out[i], e);
          end
        end
        rcvd[i] = rcvd[i] + 1;
      end
      flit_in_valid[i] <= traffic_on && (sent[i] + ((flit_in_valid[i] && flit_in_ready[i]) ? 1 : 0)) < NFLIT;
      // ready mostly high; a stretch of constant ready lets the gap checks see full rate
      flit_out_ready[i] <= (cyc % 200 < 120) ? 1'b1 : (($urandom % 4) != 0);
    end
  end

  // ---------------- helpers ----------------
  function automatic int nb(input int i, input int d);
    int r, c;
    r = i / COLS; c = i % COLS;
    case (d)
      0: return (r > 0) ? i - COLS : -1;
      1: return (c < COLS - 1) ? i + 1 : -1;
      2: return (r < 3) ? i + COLS : -1;
      default: return (c > 0) ? i - 1 : -1;
    endcase
  endfunction

  task automatic do_map();
    @(negedge clk);
    remap = 1;
    @(negedge clk);
    remap = 0;
    for (int t = 0; t < 200 && !map_ready; t++) @(negedge clk);
    check(map_ready, "mapping settles");
  endtask

  // consistency of the final maps with the cluster counts
  task automatic check_maps(input bit online);
    for (int i = 0; i < R; i++) begin
      int h, b, l, k;
      link_mode_e m;
      h = 0;
      for (int p = 0; p < 4; p++) h += !tsv_fault[i][p];
      h += !tsv_fault[i][RED];
      b = $countones(borrow_map[i]);
      l = $countones(lend_map[i]);
      k = h - l + b;
      if (k > 4) k = 4;
      m = (k == 4) ? MODE_NORMAL : (k + l >= 4) ? MODE_VIRTUAL : (k >= 2) ? MODE_SERIAL2 :
          (k == 1) ? MODE_SERIAL4 : MODE_DISABLED;
      check(l <= h, $sformatf("router %0d lends only what it owns", i));
      check(link_mode[i] == m, $sformatf("router %0d mode %s from counts", i, link_mode[i].name()));
      if (m == MODE_DISABLED) n_disabled++;
      n_borrow_edges += b;
      if (b > 0 && l > 0) n_chain++;
      if (b == 0 && l == 0 && m == MODE_NORMAL && tsv_fault[i][3:0] != 0) n_internal++;
      for (int d = 0; d < 4; d++) begin
        int n;
        n = nb(i, d);
        if (n >= 0) begin
          check(borrow_map[i][d] == lend_map[n][d ^ 2], $sformatf("router %0d dir %0d borrow/lend agree", i, d));
          if (online && borrow_map[i][d])
            check({cfg_or_sawi(i), 4'(i)} > {cfg_or_sawi(n), 4'(n)}, $sformatf("router %0d borrows downhill", i));
        end else begin
          check(!borrow_map[i][d], "no borrowing across the layer edge");
        end
      end
    end
  endtask

  function automatic logic [WW-1:0] cfg_or_sawi(input int i);
    int h;
    if (!use_sawi) return cfg_weight[i];
    h = 0;
    for (int p = 0; p < 5; p++) h += !tsv_fault[i][p];
    return WW'((h > 4) ? 3 : 4);
  endfunction

  task automatic run_traffic(input string name);
    for (int i = 0; i < R; i++) begin
      sent[i] = 0; rcvd[i] = 0; last_acc[i] = -1; min_gap[i] = 1000;
    end
    traffic_on = 1;
    for (int t = 0; t < 20000; t++) begin
      int done;
      @(negedge clk);
      done = 1;
      for (int i = 0; i < R; i++)
        if (link_mode[i] != MODE_DISABLED && rcvd[i] < NFLIT) done = 0;
      if (done) break;
    end
    traffic_on = 0;
    repeat (4) @(negedge clk);
    for (int i = 0; i < R; i++) begin
      if (link_mode[i] == MODE_DISABLED) begin
        check(sent[i] == 0, $sformatf("%s: disabled router %0d sends nothing", name, i));
      end else begin
        check(rcvd[i] == NFLIT && expq[i].size() == 0, $sformatf("%s: router %0d delivered all flits", name, i));
        case (link_mode[i])
          MODE_NORMAL:  if (!shares_with_virtual(i))
                          check(min_gap[i] == 1, $sformatf("%s: router %0d one flit per cycle", name, i));
          MODE_SERIAL2: check(min_gap[i] == 2, $sformatf("%s: router %0d 2:1 serial takes 2 cycles", name, i));
          MODE_SERIAL4: check(min_gap[i] == 4, $sformatf("%s: router %0d 4:1 serial takes 4 cycles", name, i));
          default: ;
        endcase
      end
    end
  endtask

  // a borrower that time-shares its borrowed cluster with a virtual-mode lender
  function automatic bit shares_with_virtual(input int i);
    for (int d = 0; d < 4; d++)
      if (borrow_map[i][d] && nb(i, d) >= 0 && link_mode[nb(i, d)] == MODE_VIRTUAL) return 1'b1;
    return 1'b0;
  endfunction

  task automatic expect_mode(input int i, input link_mode_e m, input logic [3:0] bm);
    check(link_mode[i] == m, $sformatf("router %0d expected %s got %s", i, m.name(), link_mode[i].name()));
    check(borrow_map[i] == bm, $sformatf("router %0d borrow map %b expected %b", i, borrow_map[i], bm));
  endtask

  // ---------------- scenarios ----------------
  initial begin
    flit_in = '0; flit_in_valid = '0; flit_out_ready = '1;
    tsv_fault = '0; ext_fault = '0; off_borrow = '0; remap = 0; offline = 0; use_sawi = 0;
    for (int i = 0; i < R; i++) cfg_weight[i] = WW'(8);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. online, placement-flow weights
    cfg_weight[0] = 1; cfg_weight[3] = 1; cfg_weight[12] = 1; cfg_weight[15] = 1;
    cfg_weight[14] = 9; cfg_weight[5] = 10;
    tsv_fault[0]  = 5'b11111;   // nothing left, lowest weight -> disabled
    tsv_fault[3]  = 5'b10111;   // one cluster -> 4:1
    tsv_fault[12] = 5'b10011;   // two clusters -> 2:1
    tsv_fault[15] = 5'b10000;   // four, lends one to 14 -> virtual
    tsv_fault[14] = 5'b10011;   // borrows from 15 then 10
    tsv_fault[5]  = 5'b11111;   // borrows from 1, 4, 6, 9
    tsv_fault[9]  = 5'b10000;   // lends to 5, borrows from 8: chain
    tsv_fault[11] = 5'b00100;   // repaired by its redundant cluster
    do_map();
    expect_mode(0,  MODE_DISABLED, 4'b0000);
    expect_mode(3,  MODE_SERIAL4,  4'b0000);
    expect_mode(12, MODE_SERIAL2,  4'b0000);
    expect_mode(15, MODE_VIRTUAL,  4'b0000);
    expect_mode(14, MODE_NORMAL,   4'b0011);
    expect_mode(5,  MODE_NORMAL,   4'b1111);
    expect_mode(9,  MODE_NORMAL,   4'b1000);
    expect_mode(11, MODE_NORMAL,   4'b0000);
    check(lend_map[9] == 4'b0001 && lend_map[15] == 4'b1000, "lenders of the chain");
    check_maps(1);
    run_traffic("online");

    // 2. offline map from the host
    tsv_fault = '0;
    tsv_fault[5]  = 5'b11111;
    tsv_fault[10] = 5'b11111;
    off_borrow = '0;
    off_borrow[5]  = 4'b1111;
    off_borrow[10] = 4'b1111;
    off_borrow[6]  = 4'b0001;   // 6 lends twice, refills from 2
    off_borrow[9]  = 4'b1000;   // 9 lends twice, refills from 8
    offline = 1;
    do_map();
    for (int i = 0; i < R; i++) check(link_mode[i] == MODE_NORMAL, $sformatf("offline: router %0d normal", i));
    check_maps(0);
    run_traffic("offline");
    offline = 0;

    // 3. SAWI weights
    tsv_fault = '0;
    tsv_fault[6]  = 5'b10011;   // weight 4, borrows from 2 then 5 (weight 3)
    tsv_fault[13] = 5'b11111;   // three neighbours -> 2:1 serial
    use_sawi = 1;
    do_map();
    expect_mode(6, MODE_NORMAL, 4'b1001);
    expect_mode(13, MODE_SERIAL2, 4'b1011);
    check_maps(1);
    run_traffic("sawi");

    // mechanism coverage
    check(n_flit_mode[MODE_NORMAL] > 0,  "normal-mode flits seen");
    check(n_flit_mode[MODE_VIRTUAL] > 0, "virtual-TSV flits seen");
    check(n_flit_mode[MODE_SERIAL2] > 0, "2:1 serial flits seen");
    check(n_flit_mode[MODE_SERIAL4] > 0, "4:1 serial flits seen");
    check(n_disabled > 0,      "disabled link seen");
    check(n_borrow_edges > 0,  "borrowing seen");
    check(n_chain > 0,         "borrowing chain seen");
    check(n_internal > 0,      "internal repair seen");
    check(n_offline_flits > 0, "offline map used");
    check(n_sawi_flits > 0,    "SAWI map used");
    check(n_stall > 0,         "backpressure seen");
    check(n_virtual_wait > 0,  "virtual lender waited for its grant");
    $display("flits normal=%0d virtual=%0d serial2=%0d serial4=%0d; disabled=%0d borrows=%0d chains=%0d internal=%0d stalls=%0d vwait=%0d",
             n_flit_mode[0], n_flit_mode[1], n_flit_mode[2], n_flit_mode[3], n_disabled,
             n_borrow_edges, n_chain, n_internal, n_stall, n_virtual_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
