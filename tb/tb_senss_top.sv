// tb_senss_top: end-to-end test of the SENSS bus at its full default size.
//
// Four processors (PIDs 0..3) run two programs as in the SENSS overview
// figure: application 1 on processors {0,1,2} and application 2 on {2,3}.
// The testbench plays the operating system and the processors: it takes
// each program's GID from the SHU's free-GID allocator, marks it occupied
// on every processor, installs the member rows, the session key, the
// authentication interval (10 transfers for application 1, 1 transfer --
// every transfer authenticated -- for application 2) and the 8 initial
// masks and MAC vectors on each member. It then runs random cache-to-cache
// traffic of both groups with every member sending, and finally plays main
// memory and an attacker through the external bus agent port.
//
// Checked: every transfer is delivered, decrypted, to every other member of
// its group and to nobody else, with its GID and PID, 3 cycles after the
// sender accepted it; no alarm during normal traffic; every authentication
// is accepted by every member; a non-member send is refused; a pad request
// from memory is ignored; a released GID is offered again; a message
// spoofing processor 1's PID raises processor 1's alarm and the global
// alarm. Each mechanism -- mask-wait stall, authentication, round-robin
// initiators, discard by non-members, refused send, external bus transfer,
// GID allocation and release, spoof alarm -- is counted and must happen at
// least once.
module tb_senss_top;
  import senss_pkg::*;

  localparam int unsigned NPROC  = 4;
  localparam int unsigned NMASK  = 8;
  localparam int unsigned DATA_W = 256;
  localparam int unsigned NMSG   = 24;   // transfers per sender per group

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_en [NPROC];
  cfg_op_e           cfg_op [NPROC];
  logic [GID_W-1:0]  cfg_gid [NPROC];
  logic [2:0]        cfg_slot [NPROC];
  logic [DATA_W-1:0] cfg_data [NPROC];
  logic              alloc_valid [NPROC];
  logic [GID_W-1:0]  alloc_gid [NPROC];
  logic              tx_valid [NPROC], tx_ready [NPROC], tx_err [NPROC];
  logic [GID_W-1:0]  tx_gid [NPROC];
  logic [DATA_W-1:0] tx_data [NPROC];
  logic              rx_valid [NPROC];
  logic [GID_W-1:0]  rx_gid [NPROC];
  logic [PID_W-1:0]  rx_pid [NPROC];
  logic [DATA_W-1:0] rx_data [NPROC];
  logic              alarm [NPROC];
  logic [2:0]        alarm_cause [NPROC];
  logic              alarm_global;
  logic [31:0]       n_stall [NPROC], n_auth_sent [NPROC], n_auth_ok [NPROC], n_discard [NPROC];
  logic              ext_req = 1'b0, ext_gnt, ext_done, ext_valid = 1'b0;
  msg_type_e         ext_type = MSG_PAD_REQ;
  logic [GID_W-1:0]  ext_gid = '0;
  logic [PID_W-1:0]  ext_pid = '0;
  logic [DATA_W-1:0] ext_data = '0;
  logic              bus_valid;
  msg_type_e         bus_type;
  logic [GID_W-1:0]  bus_gid;
  logic [PID_W-1:0]  bus_pid;
  logic [DATA_W-1:0] bus_data;
  logic [31:0]       n_bus_grants;

  senss_top dut (.*);

  assign ext_done = ext_req && ext_gnt;

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

  // groups: index 0 = application 1, 1 = application 2
  int               gid [2];
  logic [NPROC-1:0] members [2] = '{4'b0111, 4'b1100};
  int               interval [2] = '{10, 1};

  typedef struct {
    int                gid;
    int                pid;
    logic [DATA_W-1:0] d;
    int                cyc;
  } exp_t;
  exp_t exp_q [NPROC][$];
  int   n_delivered = 0, n_sent = 0;
  logic checking = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < int'(NPROC); i++) begin
        if (tx_ready[i] && !tx_err[i]) begin
          int g;
          g = (int'(tx_gid[i]) == gid[0]) ? 0 : 1;
          n_sent++;
          for (int j = 0; j < int'(NPROC); j++)
            if (j != i && members[g][j])
              exp_q[j].push_back('{gid: int'(tx_gid[i]), pid: i, d: tx_data[i], cyc: cycle});
        end
        if (rx_valid[i] && checking) begin
          checks++;
          if (exp_q[i].size() == 0) begin
            fail($sformatf("processor %0d received an unexpected message", i));
          end else begin
            exp_t e;
            e = exp_q[i].pop_front();
            if (rx_data[i] !== e.d || int'(rx_gid[i]) != e.gid || int'(rx_pid[i]) != e.pid)
              fail($sformatf("processor %0d got %h g%0d p%0d want %h g%0d p%0d", i,
                             rx_data[i], rx_gid[i], rx_pid[i], e.d, e.gid, e.pid));
            else if (cycle - e.cyc != 3)
              fail($sformatf("processor %0d latency %0d want 3", i, cycle - e.cyc));
            else n_delivered++;
          end
        end
      end
    end
  end

  task automatic cfg_one(input int p, input cfg_op_e op, input int g, input int s,
                         input logic [DATA_W-1:0] d);
    @(negedge clk);
    cfg_en[p] = 1'b1; cfg_op[p] = op; cfg_gid[p] = GID_W'(g);
    cfg_slot[p] = 3'(s); cfg_data[p] = d;
    @(negedge clk);
    cfg_en[p] = 1'b0;
  endtask

  task automatic cfg_all(input cfg_op_e op, input int g, input logic [DATA_W-1:0] d);
    for (int p = 0; p < int'(NPROC); p++) cfg_one(p, op, g, 0, d);
  endtask

  // program start: allocate a GID and install the group on every processor
  task automatic start_group(input int k);
    logic [KEY_W-1:0] key;
    #1;
    checks++;
    if (!alloc_valid[0]) fail("no free GID");
    gid[k] = int'(alloc_gid[0]);
    cfg_all(CFG_OCCUPY, gid[k], '0);
    cfg_all(CFG_ROW, gid[k], DATA_W'(members[k]));
    key = {$urandom, $urandom, $urandom, $urandom};
    for (int p = 0; p < int'(NPROC); p++) begin
      if (members[k][p]) begin
        cfg_one(p, CFG_KEY, gid[k], 0, DATA_W'(key));
        cfg_one(p, CFG_CTR, gid[k], 0, DATA_W'(interval[k]));
      end
    end
    for (int s = 0; s < int'(NMASK); s++) begin
      logic [DATA_W-1:0] m, v;
      m = rnd();
      v = rnd();
      for (int p = 0; p < int'(NPROC); p++)
        if (members[k][p]) begin
          cfg_one(p, CFG_MASK, gid[k], s, m);
          cfg_one(p, CFG_MAC, gid[k], s, v);
        end
    end
  endtask

  task automatic send(input int p, input int g, input logic [DATA_W-1:0] d);
    @(negedge clk);
    tx_valid[p] = 1'b1; tx_gid[p] = GID_W'(g); tx_data[p] = d;
    do @(posedge clk); while (!tx_ready[p]);
    @(negedge clk);
    tx_valid[p] = 1'b0;
  endtask

  task automatic ext_send(input msg_type_e t, input int g, input int p,
                          input logic [DATA_W-1:0] d);
    @(negedge clk);
    ext_req = 1'b1;
    while (!ext_gnt) @(negedge clk);
    @(negedge clk);        // grant used in the previous cycle: drive now
    ext_req = 1'b0;
    ext_valid = 1'b1; ext_type = t; ext_gid = GID_W'(g); ext_pid = PID_W'(p); ext_data = d;
    @(negedge clk);
    ext_valid = 1'b0;
  endtask

  int c_stall, c_auth_sent, c_auth_ok, c_discard, c_refused, c_ext, c_alloc, c_release,
      c_spoof, c_initiators;

  initial begin
    for (int i = 0; i < int'(NPROC); i++) begin
      cfg_en[i] = 0; cfg_op[i] = CFG_OCCUPY; cfg_gid[i] = 0; cfg_slot[i] = 0; cfg_data[i] = 0;
      tx_valid[i] = 0; tx_gid[i] = 0; tx_data[i] = 0;
    end
    c_refused = 0; c_ext = 0; c_alloc = 0; c_release = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    start_group(0);
    start_group(1);
    c_alloc = 2;
    checks++;
    if (gid[0] != 0 || gid[1] != 1) fail($sformatf("allocated GIDs %0d %0d", gid[0], gid[1]));

    // random traffic: every member of both groups sends NMSG transfers
    fork
      for (int k = 0; k < int'(NMSG); k++) send(0, gid[0], rnd());
      for (int k = 0; k < int'(NMSG); k++) send(1, gid[0], rnd());
      for (int k = 0; k < int'(NMSG); k++) begin
        send(2, gid[k % 2], rnd());
        if (k % 5 == 0) repeat ($urandom_range(20)) @(posedge clk);
      end
      for (int k = 0; k < int'(NMSG); k++) begin
        send(3, gid[1], rnd());
        repeat ($urandom_range(30)) @(posedge clk);
      end
      ext_send(MSG_PAD_REQ, 0, 31, rnd());
    join
    c_ext++;
    // application 1 alone saturates the bus: slots are reused before their
    // update is back
    fork
      for (int k = 0; k < int'(NMSG); k++) send(0, gid[0], rnd());
      for (int k = 0; k < int'(NMSG); k++) send(1, gid[0], rnd());
      for (int k = 0; k < int'(NMSG); k++) send(2, gid[0], rnd());
    join
    // a non-member send is refused
    @(negedge clk);
    tx_valid[3] = 1'b1; tx_gid[3] = GID_W'(gid[0]); tx_data[3] = rnd();
    #1;
    if (tx_err[3] && tx_ready[3]) c_refused++;
    @(negedge clk);
    tx_valid[3] = 1'b0;
    repeat (200) @(posedge clk);

    for (int j = 0; j < int'(NPROC); j++) begin
      checks++;
      if (exp_q[j].size() != 0) fail($sformatf("processor %0d missed %0d", j, exp_q[j].size()));
      checks++;
      if (alarm[j]) fail($sformatf("processor %0d alarm %b in normal traffic", j, alarm_cause[j]));
    end
    checks++;
    if (alarm_global) fail("global alarm in normal traffic");
    c_stall = 0; c_auth_sent = 0; c_auth_ok = 0; c_discard = 0; c_initiators = 0;
    for (int j = 0; j < int'(NPROC); j++) begin
      c_stall     += int'(n_stall[j]);
      c_auth_sent += int'(n_auth_sent[j]);
      c_auth_ok   += int'(n_auth_ok[j]);
      c_discard   += int'(n_discard[j]);
      if (n_auth_sent[j] != 0) c_initiators++;
    end
    // authentications: each is checked by every member of its group
    begin
      int want_ok;
      // group 1: 5*NMSG + NMSG/2 transfers, one check per 10 by 3 members;
      // group 2: every transfer, 2 members
      want_ok = 3 * ((5 * NMSG + NMSG / 2) / 10) + 2 * (NMSG + NMSG / 2);
      checks++;
      if (c_auth_ok != want_ok)
        fail($sformatf("authentications accepted %0d want %0d", c_auth_ok, want_ok));
    end
    // discards: processor 3 sees group-1 traffic, processors 0 and 1 group-2 traffic
    checks++;
    if (c_discard != (5 * NMSG + NMSG / 2) + 2 * (NMSG + NMSG / 2))
      fail($sformatf("discards %0d", c_discard));
    checks++;
    if (n_bus_grants == 0) fail("no bus grants");

    // program 2 ends: its GID is offered again
    cfg_all(CFG_RELEASE, gid[1], '0);
    #1;
    if (alloc_valid[0] && int'(alloc_gid[0]) == gid[1]) c_release++;

    // an attacker drives a group-1 message claiming to be processor 1; the
    // other members decrypt it (to garbage), so delivery is not checked
    for (int j = 0; j < int'(NPROC); j++) exp_q[j].delete();
    checking = 1'b0;
    ext_send(MSG_DATA, gid[0], 1, rnd());
    repeat (5) @(posedge clk);
    c_spoof = (alarm[1] && alarm_cause[1][1] && !alarm[0] && !alarm[2] && !alarm[3] &&
               alarm_global) ? 1 : 0;

    $display("sent %0d delivered %0d stalls %0d auth sent %0d ok %0d initiators %0d discards %0d",
             n_sent, n_delivered, c_stall, c_auth_sent, c_auth_ok, c_initiators, c_discard);
    $display("refused %0d ext %0d alloc %0d release %0d spoof %0d",
             c_refused, c_ext, c_alloc, c_release, c_spoof);
    checks++; if (c_stall == 0)      fail("mechanism never happened: mask-wait stall");
    checks++; if (c_auth_sent == 0)  fail("mechanism never happened: authentication");
    checks++; if (c_initiators < 2)  fail("mechanism never happened: round-robin initiator");
    checks++; if (c_discard == 0)    fail("mechanism never happened: non-member discard");
    checks++; if (c_refused == 0)    fail("mechanism never happened: refused send");
    checks++; if (c_ext == 0)        fail("mechanism never happened: external bus transfer");
    checks++; if (c_alloc == 0)      fail("mechanism never happened: GID allocation");
    checks++; if (c_release == 0)    fail("mechanism never happened: GID release");
    checks++; if (c_spoof == 0)      fail("mechanism never happened: spoof alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
