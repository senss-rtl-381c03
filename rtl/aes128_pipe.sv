// aes128_pipe: fully pipelined AES-128 encryption engine.
//
// The SHU derives every bus mask and every CBC MAC from AES encryptions of a
// per-group key. The engine accepts one block per clock with its own 128-bit
// key and an opaque tag, and returns the ciphertext with the same tag exactly
// LAT cycles later, in order. Cipher: FIPS-197 AES-128, encryption only (the
// bus scheme never needs the inverse cipher).
//
// Structure: one input register applying the initial AddRoundKey, ten round
// registers, each expanding its own round key on the fly from the previous
// one (so consecutive operations may use different group keys), and a delay
// line that pads the latency to LAT cycles. The document models an AES of
// 80 cycles latency at 1 GHz whose throughput matches the bus; the split of
// those cycles into round logic and padding is this design's choice.
//
// Interface: in_valid/in_key/in_data/in_tag are sampled on a rising clock
// edge; out_valid/out_data/out_tag are registered outputs. rst_n clears only
// the valid bits.
module aes128_pipe
  import aes_pkg::*;
#(
  parameter int unsigned LAT   = 80,  // cycles from input sample to output
  parameter int unsigned TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  blk_t             in_key,
  input  blk_t             in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output blk_t             out_data,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned CORE = 11;          // input stage + 10 rounds
  localparam int unsigned PAD  = LAT - CORE;  // extra delay stages

  initial assert (LAT >= CORE) else $error("aes128_pipe: LAT must be >= %0d", CORE);

  logic             v  [CORE];
  blk_t             st [CORE];
  blk_t             kk [CORE];
  logic [TAG_W-1:0] tg [CORE];

  // Stage 0: initial AddRoundKey.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end
  always_ff @(posedge clk) begin
    st[0] <= in_data ^ in_key;
    kk[0] <= in_key;
    tg[0] <= in_tag;
  end

  // Rounds 1..10 (round 10 without MixColumns).
  for (genvar r = 1; r < CORE; r++) begin : g_round
    blk_t rk, ss, nx;
    always_comb begin
      rk = next_key(kk[r-1], rcon_of(r));
      ss = sub_shift(st[r-1]);
      nx = ((r == CORE - 1) ? ss : mix_columns(ss)) ^ rk;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[r] <= 1'b0;
      else        v[r] <= v[r-1];
    end
    always_ff @(posedge clk) begin
      st[r] <= nx;
      kk[r] <= rk;
      tg[r] <= tg[r-1];
    end
  end

  // Latency padding.
  if (PAD == 0) begin : g_nopad
    assign out_valid = v[CORE-1];
    assign out_data  = st[CORE-1];
    assign out_tag   = tg[CORE-1];
  end else begin : g_pad
    logic             dv [PAD];
    blk_t             dd [PAD];
    logic [TAG_W-1:0] dt [PAD];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(PAD); i++) dv[i] <= 1'b0;
      end else begin
        dv[0] <= v[CORE-1];
        for (int i = 1; i < int'(PAD); i++) dv[i] <= dv[i-1];
      end
    end
    always_ff @(posedge clk) begin
      dd[0] <= st[CORE-1];
      dt[0] <= tg[CORE-1];
      for (int i = 1; i < int'(PAD); i++) begin
        dd[i] <= dd[i-1];
        dt[i] <= dt[i-1];
      end
    end
    assign out_valid = dv[PAD-1];
    assign out_data  = dd[PAD-1];
    assign out_tag   = dt[PAD-1];
  end

endmodule
