// tb_shu: self-checking test of the Security Hardware Unit on a shared bus.
//
// Three SHUs (PIDs 0, 1, 2) share a bus built in the testbench, arbitrated
// by bus_arbiter. Between the bus and each SHU's snoop input sits an
// adversary that can hide a message from chosen SHUs or inject its own
// messages. Group 3 has members {0,1,2} and an authentication interval of
// 4 transfers; group 5 has members {0,1} (SHU 2 only marks it occupied).
// Two masks per group are used so that back-to-back traffic must wait for
// mask updates.
//
// Checked, independently of the SHU:
//  - the first transfer in each slot appears on the bus as data ^ initial
//    mask of that slot, and every later one differs from its plaintext;
//  - every other member delivers exactly the plaintext that was sent, with
//    its GID and PID, 3 cycles after the sender accepted it (1 send + 2
//    receive); the sender and non-members deliver nothing;
//  - non-members discard, a non-member send is refused;
//  - periodic authentications succeed on every member with no alarm, and
//    mask-wait stalls happen;
//  - attacks: hiding one transfer from one member (type 1), a message
//    tagged with a member's own PID (type 3), and a replayed message shown
//    to all but its claimed sender (type 3) each raise the expected alarm.
module tb_shu;
  import senss_pkg::*;

  localparam int unsigned NP      = 3;
  localparam int unsigned GROUPS  = 16;
  localparam int unsigned NMASK   = 2;
  localparam int unsigned DATA_W  = 256;
  localparam int unsigned AES_LAT = 80;
  localparam int unsigned BUS_CYC = 10;
  localparam int unsigned G_A     = 3;   // members {0,1,2}
  localparam int unsigned G_B     = 5;   // members {0,1}
  localparam int unsigned CTR     = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // SHU ports
  logic              cfg_en [NP];
  cfg_op_e           cfg_op [NP];
  logic [GID_W-1:0]  cfg_gid [NP];
  logic [0:0]        cfg_slot [NP];
  logic [DATA_W-1:0] cfg_data [NP];
  logic              alloc_valid [NP];
  logic [GID_W-1:0]  alloc_gid [NP];
  logic              tx_valid [NP], tx_ready [NP], tx_err [NP];
  logic [GID_W-1:0]  tx_gid [NP];
  logic [DATA_W-1:0] tx_data [NP];
  logic              rx_valid [NP];
  logic [GID_W-1:0]  rx_gid [NP];
  logic [PID_W-1:0]  rx_pid [NP];
  logic [DATA_W-1:0] rx_data [NP];
  logic [NP-1:0]     req, gnt, done;
  logic              o_valid [NP];
  msg_type_e         o_type [NP];
  logic [GID_W-1:0]  o_gid [NP];
  logic [PID_W-1:0]  o_pid [NP];
  logic [DATA_W-1:0] o_data [NP];
  logic              alarm [NP];
  logic [2:0]        cause [NP];
  logic [31:0]       n_stall [NP], n_auth_sent [NP], n_auth_ok [NP], n_discard [NP];
  logic [31:0]       n_grants;

  // bus and adversary
  logic              bus_valid;
  logic [1:0]        bus_type;
  logic [GID_W-1:0]  bus_gid;
  logic [PID_W-1:0]  bus_pid;
  logic [DATA_W-1:0] bus_data;
  logic              inj_valid = 1'b0;
  logic [GID_W-1:0]  inj_gid = '0;
  logic [PID_W-1:0]  inj_pid = '0;
  logic [DATA_W-1:0] inj_data = '0;
  logic [NP-1:0]     hide = '0;

  always_comb begin
    bus_valid = inj_valid;
    bus_type  = inj_valid ? 2'(MSG_DATA) : 2'b00;
    bus_gid   = inj_valid ? inj_gid : '0;
    bus_pid   = inj_valid ? inj_pid : '0;
    bus_data  = inj_valid ? inj_data : '0;
    for (int i = 0; i < int'(NP); i++)
      if (o_valid[i]) begin
        bus_valid = 1'b1;
        bus_type  = bus_type | 2'(o_type[i]);
        bus_gid   = bus_gid | o_gid[i];
        bus_pid   = bus_pid | o_pid[i];
        bus_data  = bus_data | o_data[i];
      end
  end

  bus_arbiter #(.N(NP), .BUS_CYCLE(BUS_CYC)) u_arb (.clk, .rst_n, .req, .done, .gnt, .n_grants);

  for (genvar i = 0; i < int'(NP); i++) begin : g_shu
    shu #(.GROUPS(GROUPS), .NMASK(NMASK), .DATA_W(DATA_W), .AES_LAT(AES_LAT)) dut (
      .clk, .rst_n, .my_pid(PID_W'(i)),
      .cfg_en(cfg_en[i]), .cfg_op(cfg_op[i]), .cfg_gid(cfg_gid[i]), .cfg_slot(cfg_slot[i]),
      .cfg_data(cfg_data[i]), .alloc_valid(alloc_valid[i]), .alloc_gid(alloc_gid[i]),
      .tx_valid(tx_valid[i]), .tx_gid(tx_gid[i]), .tx_data(tx_data[i]),
      .tx_ready(tx_ready[i]), .tx_err(tx_err[i]),
      .rx_valid(rx_valid[i]), .rx_gid(rx_gid[i]), .rx_pid(rx_pid[i]), .rx_data(rx_data[i]),
      .bus_req(req[i]), .bus_gnt(gnt[i]), .bus_done(done[i]),
      .out_valid(o_valid[i]), .out_type(o_type[i]), .out_gid(o_gid[i]), .out_pid(o_pid[i]),
      .out_data(o_data[i]),
      .in_valid(bus_valid && !hide[i]), .in_type(msg_type_e'(bus_type)), .in_gid(bus_gid),
      .in_pid(bus_pid), .in_data(bus_data),
      .alarm(alarm[i]), .alarm_cause(cause[i]), .n_stall(n_stall[i]),
      .n_auth_sent(n_auth_sent[i]), .n_auth_ok(n_auth_ok[i]), .n_discard(n_discard[i])
    );
  end

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cycle, s);
  endtask

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] r;
    for (int i = 0; i < DATA_W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // initial masks and MAC vectors of the two groups
  logic [DATA_W-1:0] m0 [2][NMASK];
  logic [DATA_W-1:0] iv [2][NMASK];
  logic [KEY_W-1:0]  key [2];

  // scoreboard: per receiver, expected {gid, pid, data, accept cycle}
  typedef struct {
    int                gid;
    int                pid;
    logic [DATA_W-1:0] d;
    int                cyc;
  } exp_t;
  exp_t exp_q [NP][$];
  int   first_use [2][NMASK];     // transfers seen per slot, for the c = d ^ m0 check
  int   slot_of [2];
  logic checking = 1'b1;          // scoreboard on (off during attacks)
  int   n_rx_ok = 0;
  logic [DATA_W-1:0] last_data_c;
  logic [GID_W-1:0]  last_data_gid;
  logic [PID_W-1:0]  last_data_pid;

  // sender accept -> expectations, and the ciphertext check on the next cycle
  logic [DATA_W-1:0] pend_d;
  int                pend_g = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < int'(NP); i++) begin
        if (tx_ready[i] && !tx_err[i] && checking) begin
          for (int j = 0; j < int'(NP); j++) begin
            bit member;
            member = (int'(tx_gid[i]) == int'(G_A)) || (j < 2);
            if (j != i && member)
              exp_q[j].push_back('{gid: int'(tx_gid[i]), pid: i, d: tx_data[i], cyc: cycle});
          end
          pend_d <= tx_data[i];
          pend_g <= (int'(tx_gid[i]) == int'(G_A)) ? 0 : 1;
        end
      end
      if (bus_valid && bus_type == 2'(MSG_DATA) && !inj_valid) begin
        last_data_c   <= bus_data;
        last_data_gid <= bus_gid;
        last_data_pid <= bus_pid;
      end
      if (bus_valid && bus_type == 2'(MSG_DATA) && !inj_valid && checking && pend_g >= 0) begin
        int s;
        s = slot_of[pend_g];
        checks++;
        if (first_use[pend_g][s] == 0) begin
          if (bus_data !== (pend_d ^ m0[pend_g][s])) fail("first ciphertext != data ^ m0");
        end else if (bus_data === pend_d) begin
          fail("ciphertext equals plaintext");
        end
        first_use[pend_g][s]++;
        slot_of[pend_g] = (s + 1) % int'(NMASK);
        pend_g <= -1;
      end
      for (int j = 0; j < int'(NP); j++) begin
        if (rx_valid[j] && checking) begin
          checks++;
          if (exp_q[j].size() == 0) begin
            fail($sformatf("SHU %0d delivered an unexpected message", j));
          end else begin
            exp_t e;
            e = exp_q[j].pop_front();
            if (rx_data[j] !== e.d || int'(rx_gid[j]) != e.gid || int'(rx_pid[j]) != e.pid)
              fail($sformatf("SHU %0d delivered %h g%0d p%0d, want %h g%0d p%0d", j,
                             rx_data[j], rx_gid[j], rx_pid[j], e.d, e.gid, e.pid));
            else if (cycle - e.cyc != 3)
              fail($sformatf("SHU %0d latency %0d, want 3", j, cycle - e.cyc));
            else n_rx_ok++;
          end
        end
      end
    end
  end

  task automatic cfg_all(input cfg_op_e op, input int g, input int s,
                         input logic [DATA_W-1:0] d);
    @(negedge clk);
    for (int i = 0; i < int'(NP); i++) begin
      cfg_en[i] = 1'b1; cfg_op[i] = op; cfg_gid[i] = GID_W'(g);
      cfg_slot[i] = 1'(s); cfg_data[i] = d;
    end
    @(negedge clk);
    for (int i = 0; i < int'(NP); i++) cfg_en[i] = 1'b0;
  endtask

  task automatic setup();
    for (int i = 0; i < int'(NP); i++) begin
      cfg_en[i] = 0; cfg_op[i] = CFG_OCCUPY; cfg_gid[i] = 0; cfg_slot[i] = 0;
      cfg_data[i] = 0; tx_valid[i] = 0; tx_gid[i] = 0; tx_data[i] = 0;
      exp_q[i].delete();
    end
    for (int g = 0; g < 2; g++) begin
      slot_of[g] = 0;
      for (int s = 0; s < int'(NMASK); s++) first_use[g][s] = 0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 2; g++) begin
      int gid;
      gid = (g == 0) ? int'(G_A) : int'(G_B);
      key[g] = {$urandom, $urandom, $urandom, $urandom};
      cfg_all(CFG_OCCUPY, gid, 0, '0);
      cfg_all(CFG_ROW, gid, 0, (g == 0) ? DATA_W'(3'b111) : DATA_W'(3'b011));
      cfg_all(CFG_KEY, gid, 0, DATA_W'(key[g]));
      cfg_all(CFG_CTR, gid, 0, (g == 0) ? DATA_W'(CTR) : DATA_W'(0));
      for (int s = 0; s < int'(NMASK); s++) begin
        m0[g][s] = rnd();
        iv[g][s] = rnd();
        cfg_all(CFG_MASK, gid, s, m0[g][s]);
        cfg_all(CFG_MAC, gid, s, iv[g][s]);
      end
    end
  endtask

  // send one message from processor p and wait for acceptance
  task automatic send(input int p, input int g, input logic [DATA_W-1:0] d);
    @(negedge clk);
    tx_valid[p] = 1'b1; tx_gid[p] = GID_W'(g); tx_data[p] = d;
    do @(posedge clk); while (!tx_ready[p]);
    @(negedge clk);
    tx_valid[p] = 1'b0;
  endtask

  // several processors send concurrently
  task automatic burst(input int n, input int g);
    fork
      for (int k = 0; k < n; k++) send(0, g, rnd());
      for (int k = 0; k < n; k++) send(1, g, rnd());
      if (g == int'(G_A)) for (int k = 0; k < n; k++) send(2, g, rnd());
    join
  endtask

  task automatic inject(input int g, input int p, input logic [DATA_W-1:0] d,
                        input logic [NP-1:0] hidden_from);
    // wait for an idle bus stretch, then drive one message
    @(negedge clk);
    while (req != 0 || gnt != 0) @(negedge clk);
    inj_valid = 1'b1; inj_gid = GID_W'(g); inj_pid = PID_W'(p); inj_data = d;
    hide = hidden_from;
    @(negedge clk);
    inj_valid = 1'b0; hide = '0;
  endtask

  task automatic drain();
    repeat (AES_LAT + 40) @(posedge clk);
  endtask

  int stalls, auths;
  initial begin
    // ---------------- normal operation
    setup();
    send(0, G_A, rnd());
    send(1, G_A, rnd());
    burst(6, G_A);
    send(0, G_B, rnd());
    send(1, G_B, rnd());
    burst(3, G_B);
    drain();
    for (int j = 0; j < int'(NP); j++) begin
      checks++;
      if (exp_q[j].size() != 0) fail($sformatf("SHU %0d missed %0d messages", j, exp_q[j].size()));
      checks++;
      if (alarm[j]) fail($sformatf("SHU %0d alarm %b in normal operation", j, cause[j]));
    end
    stalls = 0; auths = 0;
    for (int j = 0; j < int'(NP); j++) begin
      stalls += int'(n_stall[j]);
      auths  += int'(n_auth_sent[j]);
    end
    checks++;
    if (stalls == 0) fail("no mask-wait stall happened");
    // 20 transfers of group A at interval 4: 5 authentications, all seen OK by all
    checks++;
    if (auths != 5) fail($sformatf("authentications sent %0d, want 5", auths));
    for (int j = 0; j < int'(NP); j++) begin
      checks++;
      if (int'(n_auth_ok[j]) != auths) fail($sformatf("SHU %0d auth ok %0d", j, n_auth_ok[j]));
    end
    checks++;
    if (n_discard[2] != 32'd8) fail($sformatf("SHU 2 discarded %0d, want 8", n_discard[2]));
    // a non-member cannot send in group B
    @(negedge clk);
    tx_valid[2] = 1'b1; tx_gid[2] = GID_W'(G_B); tx_data[2] = rnd();
    #1;
    checks++;
    if (!(tx_err[2] && tx_ready[2] && !req[2])) fail("non-member send not refused");
    @(negedge clk);
    tx_valid[2] = 1'b0;
    // GID allocation offers the lowest free group
    checks++;
    if (!alloc_valid[0] || alloc_gid[0] != 10'd0) fail("allocator");
    $display("normal: rx ok %0d, stalls %0d, auths %0d", n_rx_ok, stalls, auths);

    // ---------------- type 1: one transfer hidden from SHU 2
    checking = 1'b0;
    setup();
    send(0, G_A, rnd());
    @(negedge clk);
    tx_valid[1] = 1'b1; tx_gid[1] = GID_W'(G_A); tx_data[1] = rnd();
    while (!gnt[1]) @(negedge clk);
    hide = 3'b100;                 // the message goes on the bus next cycle
    @(negedge clk);
    tx_valid[1] = 1'b0;
    @(negedge clk);
    hide = '0;
    send(0, G_A, rnd());
    send(1, G_A, rnd());
    send(2, G_A, rnd());
    drain();
    send(0, G_A, rnd());
    drain();
    checks++;
    if (!(cause[0][0] || cause[1][0] || cause[2][0]))
      fail("dropped transfer not caught by authentication");
    $display("type 1: alarms %b%b%b causes %b %b %b", alarm[2], alarm[1], alarm[0],
             cause[2], cause[1], cause[0]);

    // ---------------- type 3: message tagged with a member's own PID
    setup();
    send(0, G_A, rnd());
    drain();
    inject(G_A, 1, rnd(), '0);
    repeat (5) @(posedge clk);
    checks++;
    if (!(alarm[1] && cause[1][1])) fail("own-PID spoof not caught by SHU 1");
    checks++;
    if (alarm[0] || alarm[2]) fail("spoof alarm raised on the wrong SHU");

    // ---------------- type 3: replay of a transfer of SHU 0, hidden from SHU 0
    setup();
    send(0, G_A, rnd());
    send(1, G_A, rnd());
    drain();
    inject(int'(last_data_gid), 0, last_data_c, 3'b001);
    drain();
    send(2, G_A, rnd());
    drain();
    send(0, G_A, rnd());
    drain();
    checks++;
    if (!(cause[0][0] || cause[1][0] || cause[2][0]))
      fail("replayed transfer not caught by authentication");
    $display("replay: causes %b %b %b", cause[2], cause[1], cause[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
