// xbar: N x N crossbar that carries OMEGA's word-granular packets between
// the nodes' scratchpad controllers.
//
// The design connects the nodes with a crossbar of 128-bit width; scratchpad
// traffic uses small custom packets (at most a 64-bit word plus a header),
// one flit each. Each output has a round-robin arbiter over the inputs whose
// head flit names that output (flit.dst) and one output register, so a flit
// crosses in one cycle when uncontended. Two instances are used, one for
// requests and one for replies, so that replies can never be blocked behind
// requests. The round-robin arbitration, the single register stage and the
// request/reply split are this implementation's choices; the average remote
// latency quoted for the reference system (17 cycles) is a property of that
// simulated network and is not built in here.
//
// Handshake on both sides: a flit moves when valid and ready are high in the
// same cycle; in_ready is combinational from out_ready.
module xbar
  import omega_pkg::*;
#(
  parameter int unsigned N = NUM_NODES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [N-1:0]      in_valid,
  input  flit_t [N-1:0]      in_flit,
  output logic  [N-1:0]      in_ready,
  output logic  [N-1:0]      out_valid,
  output flit_t [N-1:0]      out_flit,
  input  logic  [N-1:0]      out_ready
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][IW-1:0] prio;       // per output: input with highest priority
  logic [N-1:0]         grant_v;
  logic [N-1:0][IW-1:0] grant_i;
  logic [N-1:0]         take;       // per output: register loads this cycle

  always_comb begin
    in_ready = '0;
    for (int o = 0; o < N; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      take[o]    = !out_valid[o] || out_ready[o];
      for (int j = N - 1; j >= 0; j--) begin
        int i;
        i = (int'(prio[o]) + j) % N;
        if (in_valid[i] && int'(in_flit[i].dst) == o) begin
          grant_v[o] = 1'b1;
          grant_i[o] = IW'(i);
        end
      end
      if (grant_v[o] && take[o]) in_ready[grant_i[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_flit  <= '0;
      prio      <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        if (take[o]) begin
          out_valid[o] <= grant_v[o];
          if (grant_v[o]) begin
            out_flit[o] <= in_flit[grant_i[o]];
            prio[o]     <= (int'(grant_i[o]) == N - 1) ? '0 : grant_i[o] + 1'b1;
          end
        end
      end
    end
  end

  // A flit offered on an input must stay until taken.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable(in_flit[i]));
  end

endmodule
