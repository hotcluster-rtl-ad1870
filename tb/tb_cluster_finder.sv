// tb_cluster_finder: one router's finder with its four neighbours played by
// the testbench. Directed cases, each with the expected borrow/lend state:
//   1. no fault: no request, the router can lend;
//   2. one fault with a redundant cluster: repaired inside, no request;
//   3. three faults: requests go to the lowest-keyed lower neighbour first,
//      never to a higher one; a neighbour with nothing left is marked tried
//      and the next one is asked; a busy neighbour is asked again;
//   4. a higher neighbour's request is granted, the router then falls short
//      and borrows down the chain; of two requesters the higher key wins;
//   5. start clears everything.
module tb_cluster_finder;
  import hc_pkg::*;
  localparam int unsigned KEY_W = 9;
  logic clk = 0, rst_n = 0, start;
  logic [NPHY-1:0] fault;
  logic red_present;
  logic [KEY_W-1:0] my_key;
  logic [3:0][KEY_W-1:0] nbr_key;
  logic [3:0] nbr_exist, req_in, gnt_out, req_out, gnt_in, nbr_can_lend, borrow_from, lend_to;
  logic can_lend;
  logic [2:0] healthy;
  int checks = 0, failures = 0;

  cluster_finder #(.KEY_W(KEY_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: req=%b gnt=%b borrow=%b lend=%b", what, $time, req_out, gnt_out,
               borrow_from, lend_to);
    end
  endtask

  task automatic restart();
    start = 1; @(negedge clk); start = 0; #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; fault = '0; red_present = 1; my_key = {5'd8, 4'd5};
    // N: key {6,1}, E: {9,6} (higher), S: {4,9}, W: {6,4}
    nbr_key = {{5'd6, 4'd4}, {5'd4, 4'd9}, {5'd9, 4'd6}, {5'd6, 4'd1}};
    nbr_exist = 4'hF; req_in = 0; gnt_in = 0; nbr_can_lend = 4'hF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    // 1. healthy router
    check(req_out == 0 && healthy == 5 && can_lend, "no fault: idle, can lend");
    // 2. internal repair
    fault = 5'b00100; restart();
    check(req_out == 0 && healthy == 4, "one fault repaired by redundant cluster");
    // 3. three faults: need 2 -> S (key 4) first, then W {6,4} before N {6,1}? keys: N=97, W=100
    fault = 5'b10011; restart();              // healthy 2
    check(req_out == 4'b0100, "asks lowest-keyed neighbour S first");
    nbr_can_lend = 4'b1011;                    // S has nothing left
    @(negedge clk); #1;
    check(borrow_from == 0 && req_out == 4'b0001, "S tried, asks N (next lowest)");
    gnt_in = 4'b0000;                          // N busy this cycle, still can lend
    @(negedge clk); #1;
    check(req_out == 4'b0001, "busy N asked again");
    gnt_in = 4'b0001;
    #1; @(negedge clk); gnt_in = 0; #1;
    check(borrow_from == 4'b0001 && req_out == 4'b1000, "borrowed from N, asks W");
    gnt_in = 4'b1000;
    @(negedge clk); gnt_in = 0; #1;
    check(borrow_from == 4'b1001 && req_out == 0, "two borrowed, satisfied, E never asked");
    // 4. lend to a higher neighbour, then borrow down the chain
    nbr_can_lend = 4'hF;
    fault = 5'b00001; restart();               // healthy 4 (redundant used)
    req_in = 4'b0110;                          // E {9,6} and S {4,9} both ask
    #1;
    check(gnt_out == 4'b0010, "higher-keyed requester E granted");
    @(negedge clk); req_in = 0; #1;
    check(lend_to == 4'b0010, "lent to E");
    check(req_out == 4'b0100, "now short: borrows from lowest neighbour S");
    gnt_in = 4'b0100;
    @(negedge clk); gnt_in = 0; #1;
    check(borrow_from == 4'b0100 && req_out == 0, "chain complete");
    // a router with nothing to lend refuses
    fault = 5'b11111; restart();
    req_in = 4'b0010; #1;
    check(gnt_out == 0 && !can_lend, "no cluster: refuse");
    req_in = 0;
    // all neighbours higher: no request
    fault = 5'b10001; my_key = {5'd1, 4'd0}; restart();
    repeat (3) @(negedge clk);
    #1;
    check(req_out == 0 && borrow_from == 0, "lowest router cannot borrow");
    // 5. start clears
    my_key = {5'd8, 4'd5}; fault = 5'b00011; red_present = 0; restart();
    gnt_in = 4'b0100; @(negedge clk); gnt_in = 0; #1;
    check(borrow_from == 4'b0100, "borrowed");
    restart();
    check(borrow_from == 0 && lend_to == 0, "start clears state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
