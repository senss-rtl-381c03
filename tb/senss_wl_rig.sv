// senss_wl_rig: traffic generator and scoreboard around one senss_top, used
// by tb_senss_workload to run the evaluated configurations side by side.
//
// One program runs on all four processors at a time. The rig sets up four
// groups that differ only in their authentication interval (1, 10, 32 and
// 100 transfers, the intervals the SENSS evaluation sweeps) and then, group
// by group, has every processor send NSEND transfers back to back, so the
// bus runs at its peak rate: the worst case for the mask slots. For each
// group it records the cycles the phase took, the mask-wait stalls, the
// authentications sent and accepted and the bus transfers granted, and
// checks every delivery (data, GID, PID) against a scoreboard.
//
// Interface: start (pulse) begins the run; done rises when all four phases
// are over. The per-group results are outputs indexed by group. The number
// of mask slots, NMASK, is the configuration this rig stands for; the table
// is reduced to GROUPS groups because only four are used.
module senss_wl_rig
  import senss_pkg::*;
#(
  parameter int unsigned NMASK  = 8,
  parameter int unsigned GROUPS = 64,
  parameter int unsigned NSEND  = 50
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   r_cycles    [4],
  output int   r_stalls    [4],
  output int   r_auth_sent [4],
  output int   r_auth_ok   [4],
  output int   r_grants    [4],
  output int   r_sent      [4],
  output int   r_checks,
  output int   r_failures
);

  localparam int unsigned NPROC  = 4;
  localparam int unsigned DATA_W = 256;
  localparam int unsigned SLOT_W = (NMASK > 1) ? $clog2(NMASK) : 1;
  localparam int          INTERVAL [4] = '{1, 10, 32, 100};

  logic              rst_n = 1'b0;
  logic              cfg_en [NPROC];
  cfg_op_e           cfg_op [NPROC];
  logic [GID_W-1:0]  cfg_gid [NPROC];
  logic [SLOT_W-1:0] cfg_slot [NPROC];
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
  logic              ext_req = 1'b0, ext_gnt, ext_done = 1'b0, ext_valid = 1'b0;
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

  senss_top #(.GROUPS(GROUPS), .NMASK(NMASK)) dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [DATA_W-1:0] rnd();
    logic [DATA_W-1:0] r;
    for (int i = 0; i < DATA_W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // scoreboard: every other processor must receive each accepted transfer
  typedef struct {
    int                gid;
    int                pid;
    logic [DATA_W-1:0] d;
  } exp_t;
  exp_t exp_q [NPROC][$];
  int   gids [4];
  int   sb_checks = 0, sb_failures = 0, end_checks = 0, end_failures = 0;

  assign r_checks   = sb_checks + end_checks;
  assign r_failures = sb_failures + end_failures;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < int'(NPROC); i++) begin
        if (tx_ready[i] && !tx_err[i])
          for (int j = 0; j < int'(NPROC); j++)
            if (j != i) exp_q[j].push_back('{gid: int'(tx_gid[i]), pid: i, d: tx_data[i]});
        if (rx_valid[i]) begin
          sb_checks++;
          if (exp_q[i].size() == 0) begin
            sb_failures++;
            $display("FAIL (NMASK=%0d): processor %0d unexpected message", NMASK, i);
          end else begin
            exp_t e;
            e = exp_q[i].pop_front();
            if (rx_data[i] !== e.d || int'(rx_gid[i]) != e.gid || int'(rx_pid[i]) != e.pid) begin
              sb_failures++;
              $display("FAIL (NMASK=%0d): processor %0d wrong delivery", NMASK, i);
            end
          end
        end
      end
    end
  end

  task automatic cfg_one(input int p, input cfg_op_e op, input int g, input int s,
                         input logic [DATA_W-1:0] d);
    @(negedge clk);
    cfg_en[p] = 1'b1; cfg_op[p] = op; cfg_gid[p] = GID_W'(g);
    cfg_slot[p] = SLOT_W'(s); cfg_data[p] = d;
    @(negedge clk);
    cfg_en[p] = 1'b0;
  endtask

  task automatic setup_group(input int k);
    logic [DATA_W-1:0] key;
    #1;
    gids[k] = int'(alloc_gid[0]);
    key = rnd();
    for (int p = 0; p < int'(NPROC); p++) begin
      cfg_one(p, CFG_OCCUPY, gids[k], 0, '0);
      cfg_one(p, CFG_ROW, gids[k], 0, DATA_W'(4'b1111));
      cfg_one(p, CFG_KEY, gids[k], 0, key);
      cfg_one(p, CFG_CTR, gids[k], 0, DATA_W'(INTERVAL[k]));
    end
    for (int s = 0; s < int'(NMASK); s++) begin
      logic [DATA_W-1:0] m, v;
      m = rnd();
      v = rnd();
      for (int p = 0; p < int'(NPROC); p++) begin
        cfg_one(p, CFG_MASK, gids[k], s, m);
        cfg_one(p, CFG_MAC, gids[k], s, v);
      end
    end
  endtask

  // one processor keeps tx_valid up and sends NSEND transfers back to back
  task automatic burst(input int p, input int g);
    for (int n = 0; n < int'(NSEND); n++) begin
      @(negedge clk);
      tx_valid[p] = 1'b1; tx_gid[p] = GID_W'(g); tx_data[p] = rnd();
      do @(posedge clk); while (!tx_ready[p]);
    end
    @(negedge clk);
    tx_valid[p] = 1'b0;
  endtask

  function automatic int sum(input logic [31:0] v [NPROC]);
    int s = 0;
    for (int i = 0; i < int'(NPROC); i++) s += int'(v[i]);
    return s;
  endfunction

  initial begin
    done = 1'b0;
    for (int i = 0; i < int'(NPROC); i++) begin
      cfg_en[i] = 0; cfg_op[i] = CFG_OCCUPY; cfg_gid[i] = 0; cfg_slot[i] = 0; cfg_data[i] = 0;
      tx_valid[i] = 0; tx_gid[i] = 0; tx_data[i] = 0;
    end
    for (int k = 0; k < 4; k++) begin
      r_cycles[k] = 0; r_stalls[k] = 0; r_auth_sent[k] = 0; r_auth_ok[k] = 0;
      r_grants[k] = 0; r_sent[k] = 0;
    end
    wait (start);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) setup_group(k);
    for (int k = 0; k < 4; k++) begin
      int c0, c1, st0, as0, ao0, gr0;
      @(negedge clk);
      c0 = cycle; st0 = sum(n_stall); as0 = sum(n_auth_sent); ao0 = sum(n_auth_ok);
      gr0 = int'(n_bus_grants);
      fork
        burst(0, gids[k]);
        burst(1, gids[k]);
        burst(2, gids[k]);
        burst(3, gids[k]);
      join
      c1 = cycle;
      // let the last transfer and any authentication it triggers finish
      repeat (200) @(posedge clk);
      r_cycles[k]    = c1 - c0;
      r_stalls[k]    = sum(n_stall) - st0;
      r_auth_sent[k] = sum(n_auth_sent) - as0;
      r_auth_ok[k]   = sum(n_auth_ok) - ao0;
      r_grants[k]    = int'(n_bus_grants) - gr0;
      r_sent[k]      = 4 * int'(NSEND);
    end
    for (int j = 0; j < int'(NPROC); j++) begin
      end_checks++;
      if (exp_q[j].size() != 0 || alarm[j] || alarm_global) begin
        end_failures++;
        $display("FAIL (NMASK=%0d): processor %0d missed %0d, alarm %b", NMASK, j,
                 exp_q[j].size(), alarm_cause[j]);
      end
    end
    done = 1'b1;
  end

endmodule
