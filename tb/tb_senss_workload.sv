// tb_senss_workload: the evaluated SENSS configurations under peak bus load.
//
// Four copies of the whole design run side by side, with 1, 2, 4 and 8 mask
// slots per group (the mask counts the SENSS evaluation compares; 8 is the
// default and the "enough for any load" count, AES latency / bus cycle =
// 80 / 10). Each copy is a 4-processor SMP that runs one 4-member program
// per phase with authentication intervals of 1, 10, 32 and 100 transfers,
// every processor sending back to back (see senss_wl_rig). The program
// traces of the evaluation are not available, so the traffic is synthetic:
// the saturating case, which is where the number of masks matters most.
//
// Checked per copy and interval: every transfer is delivered correctly and
// no alarm is raised; exactly floor(transfers / interval) authentications
// are sent, each accepted by all four members; the bus carries exactly
// transfers + authentications messages (so the added bus traffic is
// 1/interval of the data traffic). Across copies: the time for the same
// traffic never grows with more masks; with one mask every transfer waits
// for the previous mask update (at least one AES latency apart); with 8
// masks the bus stays close to one transfer per bus cycle. The measured
// cycles per transfer and stalls are printed as a table.
module tb_senss_workload;

  localparam int NCFG      = 4;
  localparam int NSEND     = 50;
  localparam int TRANSFERS = 4 * NSEND;
  localparam int AES_LAT   = 80;
  localparam int BUS_CYCLE = 10;
  localparam int MASKS    [NCFG] = '{1, 2, 4, 8};
  localparam int INTERVAL [4]    = '{1, 10, 32, 100};

  logic clk = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic done        [NCFG];
  int   r_cycles    [NCFG][4];
  int   r_stalls    [NCFG][4];
  int   r_auth_sent [NCFG][4];
  int   r_auth_ok   [NCFG][4];
  int   r_grants    [NCFG][4];
  int   r_sent      [NCFG][4];
  int   r_checks    [NCFG];
  int   r_failures  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    senss_wl_rig #(.NMASK(MASKS[c]), .NSEND(NSEND)) rig (
      .clk, .start, .done(done[c]),
      .r_cycles(r_cycles[c]), .r_stalls(r_stalls[c]), .r_auth_sent(r_auth_sent[c]),
      .r_auth_ok(r_auth_ok[c]), .r_grants(r_grants[c]), .r_sent(r_sent[c]),
      .r_checks(r_checks[c]), .r_failures(r_failures[c]));
  end

  int checks = 0, failures = 0;

  task automatic expect_true(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("masks interval  cycles/transfer  stalls  auths  bus msgs  traffic+%%");
    for (int c = 0; c < NCFG; c++)
      for (int k = 0; k < 4; k++)
        $display("%5d %8d %16.2f %7d %6d %9d %9.1f", MASKS[c], INTERVAL[k],
                 real'(r_cycles[c][k]) / TRANSFERS, r_stalls[c][k], r_auth_sent[c][k],
                 r_grants[c][k], 100.0 * (r_grants[c][k] - TRANSFERS) / TRANSFERS);
    for (int c = 0; c < NCFG; c++) begin
      checks   += r_checks[c];
      failures += r_failures[c];
      for (int k = 0; k < 4; k++) begin
        int want_auth;
        want_auth = TRANSFERS / INTERVAL[k];
        expect_true(r_sent[c][k] == TRANSFERS,
                    $sformatf("masks %0d interval %0d: phase not run", MASKS[c], INTERVAL[k]));
        expect_true(r_auth_sent[c][k] == want_auth,
                    $sformatf("masks %0d interval %0d: %0d authentications, want %0d",
                              MASKS[c], INTERVAL[k], r_auth_sent[c][k], want_auth));
        expect_true(r_auth_ok[c][k] == 4 * want_auth,
                    $sformatf("masks %0d interval %0d: %0d accepted, want %0d",
                              MASKS[c], INTERVAL[k], r_auth_ok[c][k], 4 * want_auth));
        expect_true(r_grants[c][k] == TRANSFERS + want_auth,
                    $sformatf("masks %0d interval %0d: %0d bus messages, want %0d",
                              MASKS[c], INTERVAL[k], r_grants[c][k], TRANSFERS + want_auth));
        expect_true(r_cycles[c][k] >= (TRANSFERS - 1) * BUS_CYCLE,
                    $sformatf("masks %0d interval %0d: faster than the bus allows",
                              MASKS[c], INTERVAL[k]));
        if (c > 0)
          expect_true(r_cycles[c][k] <= r_cycles[c-1][k],
                      $sformatf("interval %0d: %0d masks slower than %0d masks",
                                INTERVAL[k], MASKS[c], MASKS[c-1]));
      end
    end
    // one mask: each transfer waits for the update of the previous one
    expect_true(r_cycles[0][3] >= (TRANSFERS - 1) * AES_LAT,
                $sformatf("one mask: %0d cycles for %0d transfers", r_cycles[0][3], TRANSFERS));
    expect_true(r_stalls[0][3] > 0, "one mask: no stall");
    // eight masks: close to one transfer per bus cycle (within 20 %)
    expect_true(r_cycles[3][3] * 10 <= TRANSFERS * BUS_CYCLE * 12,
                $sformatf("eight masks: %0d cycles for %0d transfers", r_cycles[3][3], TRANSFERS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
