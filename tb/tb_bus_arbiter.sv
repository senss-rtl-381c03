// tb_bus_arbiter: self-checking test of the shared-bus arbiter.
//
// Phase 1: four requesters always request and send as soon as granted; the
// transfers must rotate 0,1,2,3,0,... and start exactly BUS_CYCLE clocks
// apart. Phase 2: one requester holds its grant for HOLD clocks before
// sending; the next transfer must come BUS_CYCLE clocks after its send.
// Phase 3: a requester withdraws its request while granted; the grant must
// move on. The one-hot grant and "done only when granted" rules are checked
// every cycle.
module tb_bus_arbiter;

  localparam int unsigned N         = 4;
  localparam int unsigned BUS_CYCLE = 10;
  localparam int unsigned HOLD      = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, done, gnt;
  logic [31:0]  n_grants;

  bus_arbiter #(.N(N), .BUS_CYCLE(BUS_CYCLE)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int last_done_cycle = -1, last_done_who = -1, n_done = 0;
  int phase = 0, hold_cnt = 0;
  logic [N-1:0] drop;

  always @(posedge clk) cycle <= cycle + 1;

  // requester behaviour (combinational on the current grant)
  always_comb begin
    done = '0;
    for (int i = 0; i < int'(N); i++)
      if (gnt[i] && req[i]) begin
        if (phase == 2 && i == 2) done[i] = (hold_cnt == int'(HOLD));
        else if (!(phase == 3 && i == 1)) done[i] = 1'b1;
      end
  end

  always_comb begin
    req = '1;
    if (phase == 3) req[1] = !drop[1];
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (!$onehot0(gnt)) begin failures++; $display("FAIL: grant not one-hot %b", gnt); end
      if (phase == 2 && gnt[2]) hold_cnt <= hold_cnt + 1;
      if (phase == 3 && gnt[1]) drop[1] <= 1'b1;
      if (done != 0) begin
        int who;
        who = $clog2(done);
        n_done++;
        if (last_done_cycle >= 0) begin
          int want_gap;
          want_gap = int'(BUS_CYCLE);
          if (phase == 2 && who == 2) want_gap = int'(BUS_CYCLE + HOLD);
          checks++;
          if (phase == 1 && (cycle - last_done_cycle != want_gap ||
                             who != (last_done_who + 1) % int'(N))) begin
            failures++;
            $display("FAIL: transfer by %0d after %0d gap %0d", who, last_done_who,
                     cycle - last_done_cycle);
          end
          if (phase == 2 && who == 2 && cycle - last_done_cycle != want_gap) begin
            failures++;
            $display("FAIL: held transfer gap %0d want %0d", cycle - last_done_cycle, want_gap);
          end
          if (phase == 2 && who == 3 && last_done_who == 2 &&
              cycle - last_done_cycle != int'(BUS_CYCLE)) begin
            failures++;
            $display("FAIL: transfer after hold gap %0d", cycle - last_done_cycle);
          end
          if (phase == 3 && who == 1) begin
            failures++;
            $display("FAIL: withdrawn requester sent");
          end
        end
        last_done_cycle <= cycle;
        last_done_who   <= who;
      end
    end
  end

  initial begin
    drop = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    phase = 1;
    repeat (20 * BUS_CYCLE) @(posedge clk);
    phase = 2;
    repeat (8 * BUS_CYCLE) @(posedge clk);
    phase = 3;
    repeat (8 * BUS_CYCLE) @(posedge clk);
    checks++;
    if (hold_cnt < int'(HOLD) || !drop[1]) begin
      failures++;
      $display("FAIL: phases 2/3 did not exercise hold (%0d) or drop (%b)", hold_cnt, drop[1]);
    end
    checks++;
    if (n_grants != 32'(n_done)) begin
      failures++;
      $display("FAIL: n_grants %0d != transfers %0d", n_grants, n_done);
    end
    $display("transfers %0d", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
