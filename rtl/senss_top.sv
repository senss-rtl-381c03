// senss_top: the SENSS-protected shared bus of an NPROC-way SMP.
//
// Each processor reaches the shared bus only through its Security Hardware
// Unit (SHU), which encrypts and tags what the processor sends and snoops,
// decrypts and authenticates what the members of its program groups send.
// This top holds the NPROC SHUs (PID i for SHU i), the round-robin bus
// arbiter and the bus itself: data lines plus the 2-bit message type, the
// 5-bit PID and the 10-bit GID lines the scheme adds. The processors and the
// main memory are outside: the processor side of every SHU is brought out as
// arrays indexed by PID, and an external bus agent port (arbiter requester
// NPROC) is where main memory, or any other bus master, connects. The bus is
// the OR of all drivers; a well-behaved agent drives it only for the cycle
// after its grant was used (ext_done).
//
// Sizes follow the document's evaluated machine: 4 processors, a 256-bit bus
// data path, 1024 groups, 8 masks per group, an 80-cycle AES and a bus cycle
// of 10 processor cycles (1 GHz processors on a 100 MHz bus). Clock: one
// processor cycle. Reset: active-low asynchronous on control state; tables
// come up empty (no group occupied, no rows).
//
// alarm_global is the OR of the SHUs' alarms: the document asks for a
// global alarm that halts the program when any member detects a mismatch;
// how the processors react to it is outside this design.
module senss_top
  import senss_pkg::*;
#(
  parameter int unsigned NPROC     = 4,
  parameter int unsigned GROUPS    = 1024,
  parameter int unsigned NMASK     = 8,
  parameter int unsigned DATA_W    = 256,
  parameter int unsigned AES_LAT   = 80,
  parameter int unsigned BUS_CYCLE = 10,
  localparam int unsigned SLOT_W   = (NMASK > 1) ? $clog2(NMASK) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // per-processor configuration
  input  logic               cfg_en      [NPROC],
  input  cfg_op_e            cfg_op      [NPROC],
  input  logic [GID_W-1:0]   cfg_gid     [NPROC],
  input  logic [SLOT_W-1:0]  cfg_slot    [NPROC],
  input  logic [DATA_W-1:0]  cfg_data    [NPROC],
  output logic               alloc_valid [NPROC],
  output logic [GID_W-1:0]   alloc_gid   [NPROC],
  // per-processor send side
  input  logic               tx_valid    [NPROC],
  input  logic [GID_W-1:0]   tx_gid      [NPROC],
  input  logic [DATA_W-1:0]  tx_data     [NPROC],
  output logic               tx_ready    [NPROC],
  output logic               tx_err      [NPROC],
  // per-processor receive side
  output logic               rx_valid    [NPROC],
  output logic [GID_W-1:0]   rx_gid      [NPROC],
  output logic [PID_W-1:0]   rx_pid      [NPROC],
  output logic [DATA_W-1:0]  rx_data     [NPROC],
  // per-processor status
  output logic               alarm       [NPROC],
  output logic [2:0]         alarm_cause [NPROC],
  output logic               alarm_global,
  output logic [31:0]        n_stall     [NPROC],
  output logic [31:0]        n_auth_sent [NPROC],
  output logic [31:0]        n_auth_ok   [NPROC],
  output logic [31:0]        n_discard   [NPROC],
  // external bus agent (main memory side)
  input  logic               ext_req,
  output logic               ext_gnt,
  input  logic               ext_done,
  input  logic               ext_valid,
  input  msg_type_e          ext_type,
  input  logic [GID_W-1:0]   ext_gid,
  input  logic [PID_W-1:0]   ext_pid,
  input  logic [DATA_W-1:0]  ext_data,
  // the bus as seen by every agent
  output logic               bus_valid,
  output msg_type_e          bus_type,
  output logic [GID_W-1:0]   bus_gid,
  output logic [PID_W-1:0]   bus_pid,
  output logic [DATA_W-1:0]  bus_data,
  output logic [31:0]        n_bus_grants
);

  initial assert (NPROC >= 1 && NPROC <= MAXPROC) else $error("NPROC out of range");
  initial assert (BUS_CYCLE >= 2 * (DATA_W / BLK_W))
    else $error("BUS_CYCLE too short for the SHU update sequencer");

  logic [NPROC:0] req, done, gnt;
  logic           o_valid [NPROC];
  msg_type_e      o_type  [NPROC];
  logic [GID_W-1:0]  o_gid  [NPROC];
  logic [PID_W-1:0]  o_pid  [NPROC];
  logic [DATA_W-1:0] o_data [NPROC];

  for (genvar i = 0; i < int'(NPROC); i++) begin : g_shu
    shu #(.GROUPS(GROUPS), .NMASK(NMASK), .DATA_W(DATA_W), .AES_LAT(AES_LAT)) u_shu (
      .clk, .rst_n,
      .my_pid(PID_W'(i)),
      .cfg_en(cfg_en[i]), .cfg_op(cfg_op[i]), .cfg_gid(cfg_gid[i]),
      .cfg_slot(cfg_slot[i]), .cfg_data(cfg_data[i]),
      .alloc_valid(alloc_valid[i]), .alloc_gid(alloc_gid[i]),
      .tx_valid(tx_valid[i]), .tx_gid(tx_gid[i]), .tx_data(tx_data[i]),
      .tx_ready(tx_ready[i]), .tx_err(tx_err[i]),
      .rx_valid(rx_valid[i]), .rx_gid(rx_gid[i]), .rx_pid(rx_pid[i]), .rx_data(rx_data[i]),
      .bus_req(req[i]), .bus_gnt(gnt[i]), .bus_done(done[i]),
      .out_valid(o_valid[i]), .out_type(o_type[i]), .out_gid(o_gid[i]),
      .out_pid(o_pid[i]), .out_data(o_data[i]),
      .in_valid(bus_valid), .in_type(bus_type), .in_gid(bus_gid),
      .in_pid(bus_pid), .in_data(bus_data),
      .alarm(alarm[i]), .alarm_cause(alarm_cause[i]),
      .n_stall(n_stall[i]), .n_auth_sent(n_auth_sent[i]),
      .n_auth_ok(n_auth_ok[i]), .n_discard(n_discard[i])
    );
  end

  // Global alarm: any SHU that detected an attack stops the whole machine.
  always_comb begin
    alarm_global = 1'b0;
    for (int i = 0; i < int'(NPROC); i++) alarm_global = alarm_global | alarm[i];
  end

  assign req[NPROC]  = ext_req;
  assign done[NPROC] = ext_done;
  assign ext_gnt     = gnt[NPROC];

  bus_arbiter #(.N(NPROC + 1), .BUS_CYCLE(BUS_CYCLE)) u_arb (
    .clk, .rst_n, .req, .done, .gnt, .n_grants(n_bus_grants)
  );

  // Wired-OR bus: every driver contributes only while it drives.
  always_comb begin
    logic [1:0] t;
    bus_valid = ext_valid;
    t         = ext_valid ? ext_type : 2'b00;
    bus_gid   = ext_valid ? ext_gid  : '0;
    bus_pid   = ext_valid ? ext_pid  : '0;
    bus_data  = ext_valid ? ext_data : '0;
    for (int i = 0; i < int'(NPROC); i++) begin
      if (o_valid[i]) begin
        bus_valid = 1'b1;
        t         = t        | o_type[i];
        bus_gid   = bus_gid  | o_gid[i];
        bus_pid   = bus_pid  | o_pid[i];
        bus_data  = bus_data | o_data[i];
      end
    end
    bus_type = msg_type_e'(t);
  end

endmodule
