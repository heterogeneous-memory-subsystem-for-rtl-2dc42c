// scratchpad: one node's direct-mapped vtxProp storage.
//
// Each line holds every Prop of one vertex (up to 12 bytes in the workloads
// considered, padded to a 16-byte line) so that an atomic operation gets all
// of a vertex's Props with a single access, plus one dense active-list bit per
// Prop. There are no tags: the index unit has already turned the vertex ID
// into a line number. 1 MB per core, direct mapping, the per-Prop active bit
// and the 3-cycle read latency follow the design; the line width, the single
// port and the clear-on-reset sweep are this implementation's choices.
//
// Port (one access per cycle, all fields sampled when req_valid is high):
//   - every access reads the whole line; rdata/ract appear with rvalid
//     exactly SP_LAT (3) cycles later and show the contents from before any
//     write of the same cycle (read-before-write);
//   - we with wmask writes the selected bytes of wdata;
//   - act_we writes the selected active bits from act_wdata (read-and-clear
//     of an active bit is one access).
// After reset the array is cleared one line per cycle; init_done rises when
// the sweep ends and requests are ignored before that.
module scratchpad
  import omega_pkg::*;
#(
  parameter int unsigned LINES = SP_LINES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      init_done,
  input  logic                      req_valid,
  input  logic [IDX_W-1:0]          line,
  input  logic                      we,
  input  logic [LINE_BYTES-1:0]     wmask,
  input  logic [LINE_W-1:0]         wdata,
  input  logic [MAX_PROPS-1:0]      act_we,
  input  logic [MAX_PROPS-1:0]      act_wdata,
  output logic                      rvalid,
  output logic [LINE_W-1:0]         rdata,
  output logic [MAX_PROPS-1:0]      ract
);

  localparam int unsigned AW = (LINES > 1) ? $clog2(LINES) : 1;

  logic [LINE_W-1:0]    mem [LINES];
  logic [MAX_PROPS-1:0] act [LINES];

  logic [AW-1:0] init_ptr;
  logic          init_busy;
  logic [AW-1:0] a;

  assign a = AW'(line);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_ptr  <= '0;
      init_busy <= 1'b1;
    end else if (init_busy) begin
      init_ptr <= init_ptr + 1'b1;
      if (init_ptr == AW'(LINES - 1)) init_busy <= 1'b0;
    end
  end
  assign init_done = !init_busy;

  // Array: clear sweep, then byte-masked writes.
  always_ff @(posedge clk) begin
    if (init_busy) begin
      mem[init_ptr] <= '0;
      act[init_ptr] <= '0;
    end else if (req_valid) begin
      for (int b = 0; b < LINE_BYTES; b++)
        if (we && wmask[b]) mem[a][b*8 +: 8] <= wdata[b*8 +: 8];
      for (int k = 0; k < MAX_PROPS; k++)
        if (act_we[k]) act[a][k] <= act_wdata[k];
    end
  end

  // Read pipeline: array read, then SP_LAT-1 register stages.
  logic [SP_LAT-1:0]                  v_q;
  logic [SP_LAT-1:0][LINE_W-1:0]      d_q;
  logic [SP_LAT-1:0][MAX_PROPS-1:0]   a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[SP_LAT-2:0], req_valid && !init_busy};
  end

  always_ff @(posedge clk) begin
    d_q[0] <= mem[a];
    a_q[0] <= act[a];
    for (int s = 1; s < SP_LAT; s++) begin
      d_q[s] <= d_q[s-1];
      a_q[s] <= a_q[s-1];
    end
  end

  assign rvalid = v_q[SP_LAT-1];
  assign rdata  = d_q[SP_LAT-1];
  assign ract   = a_q[SP_LAT-1];

endmodule
