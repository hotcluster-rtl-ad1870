// tb_hotcluster_ext: the external (ext.red.) and hybrid (hyb.red.) redundancy
// options of hotcluster_layer_link on a 4x4 layer. ext.red. has no internal
// redundant clusters, only one spare beyond each outward border of a border
// router; hyb.red. has both. Checks the expected borrow maps and modes of
// directed fault cases (a corner router repaired from two external spares, a
// centre router whose borrowing chain ends at an external spare, a faulty
// external spare skipped), that every router's mode follows from its cluster
// counts, and that random flits sent on every up port arrive intact and in
// order on both instances.
module tb_hotcluster_ext;
  import hc_pkg::*;
  localparam int R = 16;
  localparam int NFLIT = 16;

  logic clk = 0, rst_n = 0;
  logic [1:0][R-1:0][FLIT_W-1:0] flit_in, flit_out;
  logic [1:0][R-1:0] flit_in_valid, flit_in_ready, flit_out_valid, flit_out_ready;
  logic [R-1:0][NPHY-1:0] tsv_fault;
  logic [R-1:0][3:0] ext_fault, off_borrow;
  logic [1:0][R-1:0][3:0] borrow_map, lend_map;
  logic remap, use_sawi;
  logic [1:0] map_ready;
  logic [R-1:0][WW-1:0] cfg_weight;
  link_mode_e [1:0][R-1:0] link_mode;

  // instance 0: ext.red., instance 1: hyb.red.
  hotcluster_layer_link #(.RED_MAP('0), .EXT_RED(1'b1)) u_ext (
    .clk, .rst_n, .flit_in(flit_in[0]), .flit_in_valid(flit_in_valid[0]), .flit_in_ready(flit_in_ready[0]),
    .flit_out(flit_out[0]), .flit_out_valid(flit_out_valid[0]), .flit_out_ready(flit_out_ready[0]),
    .tsv_fault, .ext_fault, .remap, .offline(1'b0), .off_borrow, .use_sawi, .cfg_weight,
    .link_mode(link_mode[0]), .borrow_map(borrow_map[0]), .lend_map(lend_map[0]), .map_ready(map_ready[0]));
  hotcluster_layer_link #(.RED_MAP('1), .EXT_RED(1'b1)) u_hyb (
    .clk, .rst_n, .flit_in(flit_in[1]), .flit_in_valid(flit_in_valid[1]), .flit_in_ready(flit_in_ready[1]),
    .flit_out(flit_out[1]), .flit_out_valid(flit_out_valid[1]), .flit_out_ready(flit_out_ready[1]),
    .tsv_fault, .ext_fault, .remap, .offline(1'b0), .off_borrow, .use_sawi, .cfg_weight,
    .link_mode(link_mode[1]), .borrow_map(borrow_map[1]), .lend_map(lend_map[1]), .map_ready(map_ready[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // traffic and scoreboard for both instances
  logic traffic_on = 0;
  int sent [2][R];
  int rcvd [2][R];
  logic [FLIT_W-1:0] expq [2][R][$];
  always @(posedge clk) begin
    for (int u = 0; u < 2; u++)
      for (int i = 0; i < R; i++) begin
        if (flit_in_valid[u][i] && flit_in_ready[u][i]) begin
          expq[u][i].push_back(flit_in[u][i]);
          sent[u][i] = sent[u][i] + 1;
          flit_in[u][i] <= {$urandom, $urandom};
        end
        if (flit_out_valid[u][i] && flit_out_ready[u][i]) begin
          logic [FLIT_W-1:0] e;
          checks++;
          e = (expq[u][i].size() > 0) ? expq[u][i].pop_front() : ~flit_out[u][i];
          if (e !== flit_out[u][i]) begin
            failures++;
            $display("FAIL inst %0d router %0d: got %h expected %h", u, i, flit_out[u][i], e);
          end
          rcvd[u][i] = rcvd[u][i] + 1;
        end
        flit_in_valid[u][i] <= traffic_on &&
                               (sent[u][i] + ((flit_in_valid[u][i] && flit_in_ready[u][i]) ? 1 : 0)) < NFLIT;
        flit_out_ready[u][i] <= ($urandom % 5) != 0;
      end
  end

  task automatic do_map();
    @(negedge clk); remap = 1;
    @(negedge clk); remap = 0;
    for (int t = 0; t < 200 && map_ready != 2'b11; t++) @(negedge clk);
    check(map_ready == 2'b11, "mapping settles");
  endtask

  task automatic check_counts(input int u);
    for (int i = 0; i < R; i++) begin
      int h, b, l, k;
      link_mode_e m;
      h = 0;
      for (int p = 0; p < 4; p++) h += !tsv_fault[i][p];
      if (u == 1) h += !tsv_fault[i][RED];
      b = $countones(borrow_map[u][i]);
      l = $countones(lend_map[u][i]);
      k = (h - l + b > 4) ? 4 : h - l + b;
      m = (k == 4) ? MODE_NORMAL : (k + l >= 4) ? MODE_VIRTUAL : (k >= 2) ? MODE_SERIAL2 :
          (k == 1) ? MODE_SERIAL4 : MODE_DISABLED;
      check(link_mode[u][i] == m, $sformatf("inst %0d router %0d mode from counts", u, i));
    end
  endtask

  task automatic run_traffic();
    for (int u = 0; u < 2; u++) for (int i = 0; i < R; i++) begin sent[u][i] = 0; rcvd[u][i] = 0; end
    traffic_on = 1;
    for (int t = 0; t < 5000; t++) begin
      int done;
      @(negedge clk);
      done = 1;
      for (int u = 0; u < 2; u++) for (int i = 0; i < R; i++)
        if (link_mode[u][i] != MODE_DISABLED && rcvd[u][i] < NFLIT) done = 0;
      if (done) break;
    end
    traffic_on = 0;
    repeat (4) @(negedge clk);
    for (int u = 0; u < 2; u++) for (int i = 0; i < R; i++)
      if (link_mode[u][i] != MODE_DISABLED)
        check(rcvd[u][i] == NFLIT, $sformatf("inst %0d router %0d delivered all flits", u, i));
  endtask

  initial begin
    flit_in = '0; flit_in_valid = '0; flit_out_ready = '1;
    tsv_fault = '0; ext_fault = '0; off_borrow = '0; remap = 0; use_sawi = 0;
    // placement-style weights: centre routers high, border low
    for (int i = 0; i < R; i++) cfg_weight[i] = WW'(4);
    cfg_weight[5] = 12; cfg_weight[6] = 11; cfg_weight[9] = 10; cfg_weight[10] = 9;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // corner router 0: two faults -> the two external spares N and W (ext.red.);
    // with hyb.red. the redundant cluster covers one, one external spare the other
    tsv_fault[0] = 5'b00011;
    // centre router 5: one fault -> borrows from router 1 (lowest neighbour, id 1),
    // which refills from its external spare N in ext.red.
    tsv_fault[5] = 5'b00100;
    // router 3: one fault, its external N spare is faulty -> uses external E
    tsv_fault[3] = 5'b01000;
    ext_fault[3] = 4'b0001;
    do_map();
    check(borrow_map[0][0] == 4'b1001 && link_mode[0][0] == MODE_NORMAL, "ext: corner uses N and W spares");
    check(borrow_map[0][5] == 4'b0001 && borrow_map[0][1] == 4'b0001 && lend_map[0][1] == 4'b0100,
          "ext: chain 5 -> 1 -> external spare");
    check(borrow_map[0][3] == 4'b0010, "ext: faulty external spare skipped");
    check(borrow_map[1][0] == 4'b0001 && borrow_map[1][5] == 4'b0000 && borrow_map[1][3] == 4'b0000,
          "hyb: internal spare first, one external spare for the second fault");
    for (int i = 0; i < R; i++) check(link_mode[0][i] == MODE_NORMAL && link_mode[1][i] == MODE_NORMAL,
                                      $sformatf("router %0d normal", i));
    check_counts(0); check_counts(1);
    run_traffic();

    // heavier: a whole border row loses three clusters each
    tsv_fault = '0; ext_fault = '0;
    for (int c = 0; c < 4; c++) tsv_fault[c] = 5'b10111;
    do_map();
    check_counts(0); check_counts(1);
    check(link_mode[0][0] != MODE_DISABLED && link_mode[1][1] != MODE_DISABLED, "border row keeps a link");
    run_traffic();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
