// shu: Security Hardware Unit of one processor in a SENSS multiprocessor.
//
// Every cache-to-cache transfer of a program group is sent on the shared bus
// as c = data XOR mask, tagged with the group id (GID) and the sender's
// processor id (PID). All members of the group snoop every such message, so
// they all see the same totally ordered message stream and can keep the same
// masks: after each message, every member recomputes the mask that was just
// used as mask' = AES_k(c XOR PID) (cipher block chaining with the ciphertext
// on the bus, so the XOR is the only work on the critical path). Alongside,
// every member folds the plaintext and its originator into a CBC-MAC chain,
// mac' = AES_k(mac XOR data XOR PID), started from a different initial
// vector. Every `ctr` transfers of a group, a member chosen round-robin sends
// the MAC on the bus and every member compares it with its own; a mismatch
// raises the alarm. Dropped, reordered or spoofed messages leave the members'
// chains different and so are caught at the next authentication.
//
// Mask slots: a group has NMASK masks used in turn (message n of a group uses
// slot n mod NMASK), so a slot has NMASK bus cycles to be recomputed. A slot
// is busy from the cycle its message is on the bus until its last AES result
// is written back; a sender that owns the bus but finds its slot busy holds
// the bus and waits (counted in n_stall). The sender picks the slot only after
// it owns the bus, so racing senders cannot both use the same slot.
//
// Pipeline and timing (1 clock = 1 processor cycle):
//   sender  : cycle G, bus granted and slot ready -> c = data ^ mask registered
//             (tx_ready pulses); cycle G+1 the message is on the bus.
//   snooper : cycle B, message on the bus: GID/PID lookup in the group-
//             processor matrix, mask read, slot and counters advanced;
//             cycle B+1: data = c ^ mask; cycle B+2: rx_valid.
//   update  : from B+2, 2*NB operations (NB = DATA_W/128) enter the shared
//             AES pipeline on consecutive cycles; the slot frees AES_LAT
//             cycles after the last one.
// The sender runs its own message through the same snoop pipeline (without
// rx output), so every member updates a slot in the same cycle and all agree
// on when it is free.
//
// Checks that raise the alarm (cause bits): [0] MAC mismatch at an
// authentication; [1] a data or authentication message tagged with this
// processor's own PID that this processor did not send; [2] a protocol breach: a data message for a
// slot still being updated, or an authentication from a member that is not
// the expected initiator or while an update is still pending.
//
// What follows the document: OTP-style XOR with CBC-AES masks fed with c and
// PID, chained MACs with a separate IV, per-group counter and round-robin
// initiator, mask arrays, GID/PID tagging, the matrix and table lookups, the
// 1-cycle send and 2-cycle receive XOR. This design's own choices: how PID
// enters AES (XORed into the low bits of the block), one mask/MAC chain per
// 128-bit block of the 256-bit transfer, the authentication message carrying
// the XOR of all MAC chains of the group, holding the bus while a slot is
// busy, the configuration port through which group state is installed, and
// the extra protocol checks of cause bit 2.
module shu
  import senss_pkg::*;
  import aes_pkg::*;
#(
  parameter int unsigned GROUPS  = 1024,
  parameter int unsigned NMASK   = 8,
  parameter int unsigned DATA_W  = 256,
  parameter int unsigned AES_LAT = 80,
  parameter int unsigned AUTHQ   = 4,
  localparam int unsigned SLOT_W = (NMASK > 1) ? $clog2(NMASK) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PID_W-1:0]   my_pid,
  // configuration (trusted path from the processor)
  input  logic               cfg_en,
  input  cfg_op_e            cfg_op,
  input  logic [GID_W-1:0]   cfg_gid,
  input  logic [SLOT_W-1:0]  cfg_slot,
  input  logic [DATA_W-1:0]  cfg_data,
  output logic               alloc_valid,
  output logic [GID_W-1:0]   alloc_gid,
  // processor send side
  input  logic               tx_valid,
  input  logic [GID_W-1:0]   tx_gid,
  input  logic [DATA_W-1:0]  tx_data,
  output logic               tx_ready,
  output logic               tx_err,
  // processor receive side
  output logic               rx_valid,
  output logic [GID_W-1:0]   rx_gid,
  output logic [PID_W-1:0]   rx_pid,
  output logic [DATA_W-1:0]  rx_data,
  // bus arbitration
  output logic               bus_req,
  input  logic               bus_gnt,
  output logic               bus_done,
  // bus drive (registered, one cycle per message)
  output logic               out_valid,
  output msg_type_e          out_type,
  output logic [GID_W-1:0]   out_gid,
  output logic [PID_W-1:0]   out_pid,
  output logic [DATA_W-1:0]  out_data,
  // bus snoop
  input  logic               in_valid,
  input  msg_type_e          in_type,
  input  logic [GID_W-1:0]   in_gid,
  input  logic [PID_W-1:0]   in_pid,
  input  logic [DATA_W-1:0]  in_data,
  // status
  output logic               alarm,
  output logic [2:0]         alarm_cause,
  output logic [31:0]        n_stall,
  output logic [31:0]        n_auth_sent,
  output logic [31:0]        n_auth_ok,
  output logic [31:0]        n_discard
);

  localparam int unsigned NB     = DATA_W / BLK_W;
  localparam int unsigned BLK_IW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned NOPS   = 2 * NB;
  localparam int unsigned OP_W   = $clog2(NOPS);
  localparam int unsigned GIX_W  = $clog2(GROUPS);
  localparam int unsigned TAG_W  = GID_W + SLOT_W + 1 + BLK_IW + 1;
  localparam int unsigned AQ_W   = (AUTHQ > 1) ? $clog2(AUTHQ) : 1;

  typedef struct packed {
    logic [GID_W-1:0]  gid;
    logic [SLOT_W-1:0] slot;
    logic              is_mac;
    logic [BLK_IW-1:0] blk;
    logic              last;
  } aes_tag_t;

  // ---------------------------------------------------------------- state
  logic [SLOT_W-1:0] ptr_mem  [GROUPS];  // next slot of each group
  logic [CTR_W-1:0]  cnt_mem  [GROUPS];  // transfers since last authentication
  logic [PID_W-1:0]  last_mem [GROUPS];  // PID of the last initiator
  logic [NMASK-1:0]  busy_mem [GROUPS];  // slots being recomputed

  function automatic logic [SLOT_W-1:0] slot_inc(input logic [SLOT_W-1:0] s);
    return (int'(s) == int'(NMASK) - 1) ? '0 : s + SLOT_W'(1);
  endfunction

  function automatic blk_t pid_blk(input logic [PID_W-1:0] p);
    return {{(BLK_W-PID_W){1'b0}}, p};
  endfunction

  // ---------------------------------------------------------------- tables
  logic              a_occ, b_occ;
  logic [CTR_W-1:0]  a_ctr, b_ctr;
  logic [DATA_W-1:0] a_mask, b_mask, d_digest, e_digest;
  logic [KEY_W-1:0]  b_key;
  logic [SLOT_W-1:0] tx_slot, rx_slot;
  logic              lk_hit, lk_member, mb_member;
  logic [MAXPROC-1:0] lk_row;
  logic [GID_W-1:0]  aq_head;
  logic [GID_W-1:0]  m_gid;
  logic [SLOT_W-1:0] m_slot;
  logic [BLK_IW-1:0] m_blk;
  logic [BLK_W-1:0]  m_mac;
  logic              aes_ov;
  blk_t              aes_od;
  aes_tag_t          aes_ot;

  assign tx_slot = ptr_mem[GIX_W'(tx_gid)];
  assign rx_slot = ptr_mem[GIX_W'(in_gid)];

  group_info_table #(.GROUPS(GROUPS), .NMASK(NMASK), .DATA_W(DATA_W)) u_table (
    .clk, .rst_n,
    .cfg_en, .cfg_op, .cfg_gid, .cfg_slot, .cfg_data,
    .a_gid(tx_gid), .a_slot(tx_slot), .a_occ, .a_ctr, .a_mask,
    .b_gid(in_gid), .b_slot(rx_slot), .b_occ, .b_ctr, .b_key, .b_mask,
    .m_gid, .m_slot, .m_blk, .m_mac,
    .d_gid(aq_head), .d_digest,
    .e_gid(in_gid), .e_digest,
    .wb_en(aes_ov), .wb_gid(aes_ot.gid), .wb_slot(aes_ot.slot),
    .wb_is_mac(aes_ot.is_mac), .wb_blk(aes_ot.blk), .wb_data(aes_od),
    .free_valid(alloc_valid), .free_gid(alloc_gid)
  );

  gp_matrix #(.GROUPS(GROUPS)) u_matrix (
    .clk, .rst_n, .my_pid,
    .wr_en(cfg_en && cfg_op == CFG_ROW), .wr_gid(cfg_gid), .wr_row(cfg_data[MAXPROC-1:0]),
    .clr_en(cfg_en && cfg_op == CFG_RELEASE), .clr_gid(cfg_gid),
    .lk_gid(in_gid), .lk_pid(in_pid), .lk_hit, .lk_member, .lk_row,
    .mb_gid(tx_gid), .mb_member
  );

  // ---------------------------------------------------------------- auth queue
  // Groups for which this processor is the next authentication initiator.
  logic [GID_W-1:0] aq      [AUTHQ];
  logic [AQ_W-1:0]  aq_rd, aq_wr;
  logic [AQ_W:0]    aq_cnt;
  logic             aq_push, aq_pop, aq_ready;
  logic [GID_W-1:0] aq_push_gid;

  assign aq_head  = aq[aq_rd];
  assign aq_ready = (aq_cnt != 0) && (busy_mem[GIX_W'(aq_head)] == '0);

  // ---------------------------------------------------------------- send side
  logic tx_ok, tx_blocked, tx_busy, send_auth, send_data;

  always_comb begin
    tx_blocked = (a_ctr != 0) && (cnt_mem[GIX_W'(tx_gid)] >= a_ctr);
    tx_ok      = tx_valid && mb_member && a_occ;
    tx_busy    = busy_mem[GIX_W'(tx_gid)][tx_slot];
    bus_req    = !out_valid && (aq_ready || (tx_ok && !tx_blocked));
    send_auth  = bus_req && bus_gnt && aq_ready;
    send_data  = bus_req && bus_gnt && !aq_ready && tx_ok && !tx_blocked && !tx_busy;
    bus_done   = send_auth || send_data;
    aq_pop     = send_auth;
    tx_err     = tx_valid && !(mb_member && a_occ);
    tx_ready   = send_data || tx_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_type    <= MSG_DATA;
      out_gid     <= '0;
      out_pid     <= '0;
      out_data    <= '0;
      n_stall     <= '0;
      n_auth_sent <= '0;
    end else begin
      out_valid <= bus_done;
      if (send_auth) begin
        out_type    <= MSG_AUTH;
        out_gid     <= aq_head;
        out_data    <= d_digest;
        n_auth_sent <= n_auth_sent + 32'd1;
      end else if (send_data) begin
        out_type <= MSG_DATA;
        out_gid  <= tx_gid;
        out_data <= tx_data ^ a_mask;
      end
      out_pid <= my_pid;
      if (bus_req && bus_gnt && !aq_ready && tx_ok && !tx_blocked && tx_busy)
        n_stall <= n_stall + 32'd1;
    end
  end

  // ---------------------------------------------------------------- snoop stage 1
  typedef struct packed {
    logic              own;
    logic [GID_W-1:0]  gid;
    logic [PID_W-1:0]  pid;
    logic [SLOT_W-1:0] slot;
    logic [KEY_W-1:0]  key;
    logic [DATA_W-1:0] c;
    logic [DATA_W-1:0] mask;
  } s1_t;

  s1_t  s1;
  logic s1_valid;
  logic is_data, is_auth, slot_busy, grp_busy, exp_init, spoof;
  logic [PID_W-1:0] init_pid;
  logic [CTR_W-1:0] cnt_cur;

  always_comb begin
    is_data   = in_valid && in_type == MSG_DATA;
    is_auth   = in_valid && in_type == MSG_AUTH;
    slot_busy = busy_mem[GIX_W'(in_gid)][rx_slot];
    grp_busy  = busy_mem[GIX_W'(in_gid)] != '0;
    cnt_cur   = cnt_mem[GIX_W'(in_gid)];
    init_pid  = next_member(lk_row, last_mem[GIX_W'(in_gid)]);
    exp_init  = (in_pid == init_pid);
    spoof     = (is_data || is_auth) && lk_member && (in_pid == my_pid) && !out_valid;
    aq_push_gid = in_gid;
    aq_push   = is_data && lk_hit && !slot_busy && b_occ && !spoof &&
                (b_ctr != 0) && (cnt_cur + CTR_W'(1) == b_ctr) &&
                (next_member(lk_row, last_mem[GIX_W'(in_gid)]) == my_pid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      alarm       <= 1'b0;
      alarm_cause <= '0;
      n_auth_ok   <= '0;
      n_discard   <= '0;
    end else begin
      s1_valid <= is_data && lk_hit && b_occ && !slot_busy && !spoof;
      if (spoof) begin
        alarm          <= 1'b1;
        alarm_cause[1] <= 1'b1;
      end
      if (is_data && lk_hit && slot_busy) begin
        alarm          <= 1'b1;
        alarm_cause[2] <= 1'b1;
      end
      if (is_data && !lk_hit) n_discard <= n_discard + 32'd1;
      if (is_auth && lk_hit && !spoof) begin
        if (!exp_init || grp_busy) begin
          alarm          <= 1'b1;
          alarm_cause[2] <= 1'b1;
        end
        if (in_data != e_digest) begin
          alarm          <= 1'b1;
          alarm_cause[0] <= 1'b1;
        end else begin
          n_auth_ok <= n_auth_ok + 32'd1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    s1.own  <= out_valid;
    s1.gid  <= in_gid;
    s1.pid  <= in_pid;
    s1.slot <= rx_slot;
    s1.key  <= b_key;
    s1.c    <= in_data;
    s1.mask <= b_mask;
  end

  // Per-group counters and busy bits: configuration, snoop stage 1 and AES
  // write-back.
  always_ff @(posedge clk) begin
    if (cfg_en && cfg_op == CFG_ROW) begin
      ptr_mem[GIX_W'(cfg_gid)]  <= '0;
      cnt_mem[GIX_W'(cfg_gid)]  <= '0;
      last_mem[GIX_W'(cfg_gid)] <= PID_W'(MAXPROC - 1);
      busy_mem[GIX_W'(cfg_gid)] <= '0;
    end
    if (aes_ov && aes_ot.last)
      busy_mem[GIX_W'(aes_ot.gid)][aes_ot.slot] <= 1'b0;
    if (is_data && lk_hit && b_occ && !slot_busy && !spoof) begin
      ptr_mem[GIX_W'(in_gid)]           <= slot_inc(rx_slot);
      cnt_mem[GIX_W'(in_gid)]           <= cnt_cur + CTR_W'(1);
      busy_mem[GIX_W'(in_gid)][rx_slot] <= 1'b1;
    end
    if (is_auth && lk_hit && !spoof) begin
      cnt_mem[GIX_W'(in_gid)]  <= '0;
      last_mem[GIX_W'(in_gid)] <= in_pid;
    end
  end

  // Authentication initiator queue.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aq_rd  <= '0;
      aq_wr  <= '0;
      aq_cnt <= '0;
    end else begin
      if (aq_push) begin
        aq[aq_wr] <= aq_push_gid;
        aq_wr     <= (int'(aq_wr) == int'(AUTHQ) - 1) ? '0 : aq_wr + AQ_W'(1);
      end
      if (aq_pop) aq_rd <= (int'(aq_rd) == int'(AUTHQ) - 1) ? '0 : aq_rd + AQ_W'(1);
      aq_cnt <= aq_cnt + (AQ_W+1)'(aq_push) - (AQ_W+1)'(aq_pop);
    end
  end

  // ---------------------------------------------------------------- snoop stage 2
  typedef struct packed {
    logic [GID_W-1:0]  gid;
    logic [PID_W-1:0]  pid;
    logic [SLOT_W-1:0] slot;
    logic [KEY_W-1:0]  key;
    logic [DATA_W-1:0] c;
    logic [DATA_W-1:0] d;
  } upd_t;

  upd_t            upd;
  logic            upd_v;
  logic [OP_W-1:0] upd_op;
  logic [DATA_W-1:0] s1_plain;

  assign s1_plain = s1.c ^ s1.mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      upd_v    <= 1'b0;
      upd_op   <= '0;
    end else begin
      rx_valid <= s1_valid && !s1.own;
      if (s1_valid) begin
        upd_v  <= 1'b1;
        upd_op <= '0;
      end else if (upd_v) begin
        upd_v  <= (int'(upd_op) != int'(NOPS) - 1);
        upd_op <= upd_op + OP_W'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    rx_gid  <= s1.gid;
    rx_pid  <= s1.pid;
    rx_data <= s1_plain;
    if (s1_valid) upd <= '{gid: s1.gid, pid: s1.pid, slot: s1.slot, key: s1.key,
                           c: s1.c, d: s1_plain};
  end

  // ---------------------------------------------------------------- AES issue
  logic     aes_iv;
  blk_t     aes_id;
  aes_tag_t aes_it;
  logic [BLK_IW-1:0] op_blk;
  logic              op_mac;

  always_comb begin
    op_mac = int'(upd_op) >= int'(NB);
    op_blk = BLK_IW'(op_mac ? int'(upd_op) - int'(NB) : int'(upd_op));
    m_gid  = upd.gid;
    m_slot = upd.slot;
    m_blk  = op_blk;
    aes_iv = upd_v;
    if (op_mac) aes_id = m_mac ^ upd.d[int'(op_blk)*BLK_W +: BLK_W] ^ pid_blk(upd.pid);
    else        aes_id = upd.c[int'(op_blk)*BLK_W +: BLK_W] ^ pid_blk(upd.pid);
    aes_it = '{gid: upd.gid, slot: upd.slot, is_mac: op_mac, blk: op_blk,
               last: (int'(upd_op) == int'(NOPS) - 1)};
  end

  aes128_pipe #(.LAT(AES_LAT), .TAG_W(TAG_W)) u_aes (
    .clk, .rst_n,
    .in_valid(aes_iv), .in_key(upd.key), .in_data(aes_id), .in_tag(aes_it),
    .out_valid(aes_ov), .out_data(aes_od), .out_tag(aes_ot)
  );

  // ---------------------------------------------------------------- assertions
  a_seq_free:  assert property (@(posedge clk) disable iff (!rst_n)
                                s1_valid |-> !upd_v || (int'(upd_op) == int'(NOPS) - 1))
               else $error("shu: update sequencer still busy when a new message arrived");
  a_aq_nofull: assert property (@(posedge clk) disable iff (!rst_n)
                                aq_push |-> (int'(aq_cnt) < int'(AUTHQ)))
               else $error("shu: authentication queue overflow");

endmodule
