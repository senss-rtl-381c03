// bus_arbiter: round-robin arbiter of the shared SMP bus.
//
// SENSS requires that a sender first owns the bus and only then picks the
// mask it encrypts with, so that all processors agree on the total order of
// the messages of a group. This arbiter gives the bus to one requester at a
// time, round-robin from the last one served. A grant is held while the
// owner keeps its request up and has not sent yet (an SHU may hold the bus
// while its mask is still being recomputed); dropping the request releases
// it. When the owner sends (done), the bus stays occupied for one bus cycle
// of BUS_CYCLE clocks, so granted transfers start at least BUS_CYCLE clocks
// apart. The document gives a 100 MHz bus under 1 GHz processors; the
// round-robin policy and the request/grant/done handshake are this design's.
// The document lets the arbiter produce the message type of a transaction;
// here the sender drives the type lines itself, since only it knows whether
// it sends data or an authentication, and the arbiter only grants the bus.
//
// Timing: a request seen in cycle t is granted from cycle t+1 (gnt is a
// registered one-hot); done is sampled in the same cycle as gnt.
module bus_arbiter #(
  parameter int unsigned N         = 5,
  parameter int unsigned BUS_CYCLE = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] done,
  output logic [N-1:0] gnt,
  output logic [31:0]  n_grants   // transfers granted so far
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          own_v;
  logic [IW-1:0] own, last;
  logic [15:0]   cool;

  assign gnt = own_v ? (N'(1) << own) : '0;

  logic          nxt_v, used;
  logic [IW-1:0] nxt_own, nxt_last;
  logic [15:0]   nxt_cool;

  always_comb begin
    logic          free;
    logic [IW-1:0] c;
    c        = '0;
    used     = own_v && done[own];
    free     = !own_v || used || !req[own];
    nxt_last = used ? own : last;
    nxt_cool = used ? 16'(BUS_CYCLE - 1) : ((cool != 0) ? cool - 16'd1 : 16'd0);
    nxt_v    = own_v;
    nxt_own  = own;
    if (free) begin
      nxt_v = 1'b0;
      if (nxt_cool == 0) begin
        for (int unsigned i = N; i >= 1; i--) begin
          c = IW'((int'(nxt_last) + i) % N);
          if (req[c]) begin
            nxt_v   = 1'b1;
            nxt_own = c;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v    <= 1'b0;
      own      <= '0;
      last     <= IW'(N - 1);
      cool     <= '0;
      n_grants <= '0;
    end else begin
      own_v    <= nxt_v;
      own      <= nxt_own;
      last     <= nxt_last;
      cool     <= nxt_cool;
      n_grants <= n_grants + 32'(used);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_done:   assert property (@(posedge clk) disable iff (!rst_n) (done & ~gnt) == '0);

endmodule
