// group_info_table: the per-group secret state held in one SHU.
//
// Entry g holds the fields of the document's group information table: an
// "occupied" bit, the plaintext session key k, the authentication interval
// "ctr" and the mask array. Occupied bits are set on every processor when a
// GID is handed out, member or not, so that no two programs share a GID; the
// lowest free GID is offered on free_gid for allocation.
//
// This design keeps, per group, NMASK mask slots of DATA_W bits (the width
// of one bus data transfer, NB = DATA_W/128 AES blocks) and, beside them,
// NMASK CBC-MAC chains of DATA_W bits, so each slot has its own encryption
// mask and its own authentication chain. The document sizes an entry at
// 1161 bits (128-bit masks); the wider entry here follows from the 256-bit
// data bus.
//
// Storage is memory arrays indexed {gid, slot, block}; only the occupied
// bits are flip-flops with reset. All reads are combinational. Writes come
// from the configuration port and from the AES write-back port; both may
// happen in one cycle.
module group_info_table
  import senss_pkg::*;
#(
  parameter int unsigned GROUPS = 1024,
  parameter int unsigned NMASK  = 8,
  parameter int unsigned DATA_W = 256,
  localparam int unsigned NB     = DATA_W / BLK_W,
  localparam int unsigned SLOT_W = (NMASK > 1) ? $clog2(NMASK) : 1,
  localparam int unsigned BLK_IW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                cfg_en,
  input  cfg_op_e             cfg_op,
  input  logic [GID_W-1:0]    cfg_gid,
  input  logic [SLOT_W-1:0]   cfg_slot,
  input  logic [DATA_W-1:0]   cfg_data,
  // read port A (sender side)
  input  logic [GID_W-1:0]    a_gid,
  input  logic [SLOT_W-1:0]   a_slot,
  output logic                a_occ,
  output logic [CTR_W-1:0]    a_ctr,
  output logic [DATA_W-1:0]   a_mask,
  // read port B (snoop side)
  input  logic [GID_W-1:0]    b_gid,
  input  logic [SLOT_W-1:0]   b_slot,
  output logic                b_occ,
  output logic [CTR_W-1:0]    b_ctr,
  output logic [KEY_W-1:0]    b_key,
  output logic [DATA_W-1:0]   b_mask,
  // MAC block read for the update sequencer
  input  logic [GID_W-1:0]    m_gid,
  input  logic [SLOT_W-1:0]   m_slot,
  input  logic [BLK_IW-1:0]   m_blk,
  output logic [BLK_W-1:0]    m_mac,
  // authentication digests (XOR of all MAC chains of a group), two ports
  input  logic [GID_W-1:0]    d_gid,
  output logic [DATA_W-1:0]   d_digest,
  input  logic [GID_W-1:0]    e_gid,
  output logic [DATA_W-1:0]   e_digest,
  // AES write-back of one block of a mask or a MAC
  input  logic                wb_en,
  input  logic [GID_W-1:0]    wb_gid,
  input  logic [SLOT_W-1:0]   wb_slot,
  input  logic                wb_is_mac,
  input  logic [BLK_IW-1:0]   wb_blk,
  input  logic [BLK_W-1:0]    wb_data,
  // allocation
  output logic                free_valid,
  output logic [GID_W-1:0]    free_gid
);

  localparam int unsigned GIX_W = $clog2(GROUPS);
  localparam int unsigned DEPTH = GROUPS * NMASK * NB;

  initial assert (DATA_W % BLK_W == 0) else $error("DATA_W must be a multiple of 128");

  logic [GROUPS-1:0] occupied;
  logic [KEY_W-1:0]  key_mem  [GROUPS];
  logic [CTR_W-1:0]  ctr_mem  [GROUPS];
  logic [BLK_W-1:0]  mask_mem [DEPTH];
  logic [BLK_W-1:0]  mac_mem  [DEPTH];

  function automatic int unsigned idx(input logic [GID_W-1:0] g, input logic [SLOT_W-1:0] s,
                                      input int unsigned b);
    return (int'(g) % GROUPS) * NMASK * NB + (int'(s) % NMASK) * NB + b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occupied <= '0;
    end else if (cfg_en) begin
      if (cfg_op == CFG_OCCUPY)  occupied[GIX_W'(cfg_gid)] <= 1'b1;
      if (cfg_op == CFG_RELEASE) occupied[GIX_W'(cfg_gid)] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wb_en) begin
      if (wb_is_mac) mac_mem[idx(wb_gid, wb_slot, int'(wb_blk))]  <= wb_data;
      else           mask_mem[idx(wb_gid, wb_slot, int'(wb_blk))] <= wb_data;
    end
    if (cfg_en) begin
      case (cfg_op)
        CFG_KEY: key_mem[GIX_W'(cfg_gid)] <= cfg_data[KEY_W-1:0];
        CFG_CTR: ctr_mem[GIX_W'(cfg_gid)] <= cfg_data[CTR_W-1:0];
        CFG_MASK:
          for (int unsigned b = 0; b < NB; b++)
            mask_mem[idx(cfg_gid, cfg_slot, b)] <= cfg_data[b*BLK_W +: BLK_W];
        CFG_MAC:
          for (int unsigned b = 0; b < NB; b++)
            mac_mem[idx(cfg_gid, cfg_slot, b)] <= cfg_data[b*BLK_W +: BLK_W];
        default: ;
      endcase
    end
  end

  always_comb begin
    a_occ = occupied[GIX_W'(a_gid)];
    a_ctr = ctr_mem[GIX_W'(a_gid)];
    b_occ = occupied[GIX_W'(b_gid)];
    b_ctr = ctr_mem[GIX_W'(b_gid)];
    b_key = key_mem[GIX_W'(b_gid)];
    for (int unsigned b = 0; b < NB; b++) begin
      a_mask[b*BLK_W +: BLK_W] = mask_mem[idx(a_gid, a_slot, b)];
      b_mask[b*BLK_W +: BLK_W] = mask_mem[idx(b_gid, b_slot, b)];
    end
    m_mac    = mac_mem[idx(m_gid, m_slot, int'(m_blk))];
    d_digest = '0;
    e_digest = '0;
    for (int unsigned s = 0; s < NMASK; s++)
      for (int unsigned b = 0; b < NB; b++) begin
        d_digest[b*BLK_W +: BLK_W] = d_digest[b*BLK_W +: BLK_W] ^
                                     mac_mem[idx(d_gid, SLOT_W'(s), b)];
        e_digest[b*BLK_W +: BLK_W] = e_digest[b*BLK_W +: BLK_W] ^
                                     mac_mem[idx(e_gid, SLOT_W'(s), b)];
      end
  end

  // Lowest unoccupied GID.
  always_comb begin
    free_valid = 1'b0;
    free_gid   = '0;
    for (int g = GROUPS - 1; g >= 0; g--) begin
      if (!occupied[g]) begin
        free_valid = 1'b1;
        free_gid   = GID_W'(g);
      end
    end
  end

endmodule
