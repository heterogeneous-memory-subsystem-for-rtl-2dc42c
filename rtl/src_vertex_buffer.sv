// src_vertex_buffer: small read-only store of source-vertex Props fetched
// from remote scratchpads.
//
// Many algorithms (SSSP, BC, Radii, CC) read a source vertex's Prop once per
// outgoing edge. When that vertex lives in a remote scratchpad every read
// would cross the interconnect; instead the first remote read fills this
// buffer and the following reads of the same vertex are answered locally.
// Source Props are not written during an iteration, so the buffer needs no
// coherence: it is flushed at the end of every iteration. Lookup before
// going remote, fill on the remote reply and the flush follow the design;
// the size (16 entries), full associativity on {Prop, vertex ID} and FIFO
// replacement are this implementation's choices.
//
// Lookup is combinational (hit and data in the same cycle). A fill is
// written on the clock edge; refilling a key already present updates that
// entry. flush clears every entry on the next edge and wins over a fill.
module src_vertex_buffer
  import omega_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [PROP_W-1:0]         lk_prop,
  input  logic [VID_W-1:0]          lk_vid,
  output logic                      lk_hit,
  output logic [DATA_W-1:0]         lk_data,
  input  logic                      fill_valid,
  input  logic [PROP_W-1:0]         fill_prop,
  input  logic [VID_W-1:0]          fill_vid,
  input  logic [DATA_W-1:0]         fill_data
);

  localparam int unsigned PW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]                     valid;
  logic [ENTRIES-1:0][PROP_W+VID_W-1:0]   key;
  logic [ENTRIES-1:0][DATA_W-1:0]         data;
  logic [PW-1:0]                          wptr;

  logic          f_hit;
  logic [PW-1:0] f_idx;

  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    f_hit   = 1'b0;
    f_idx   = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && key[i] == {lk_prop, lk_vid}) begin
        lk_hit  = 1'b1;
        lk_data = data[i];
      end
      if (valid[i] && key[i] == {fill_prop, fill_vid}) begin
        f_hit = 1'b1;
        f_idx = PW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      key   <= '0;
      data  <= '0;
      wptr  <= '0;
    end else if (flush) begin
      valid <= '0;
      wptr  <= '0;
    end else if (fill_valid) begin
      if (f_hit) begin
        data[f_idx] <= fill_data;
      end else begin
        valid[wptr] <= 1'b1;
        key[wptr]   <= {fill_prop, fill_vid};
        data[wptr]  <= fill_data;
        wptr        <= (wptr == PW'(ENTRIES - 1)) ? '0 : wptr + 1'b1;
      end
    end
  end

endmodule
