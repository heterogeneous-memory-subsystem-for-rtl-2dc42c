// index_unit: finds the line of a scratchpad-resident vertex inside its home
// scratchpad.
//
// With chunk interleaving over NUM_NODES scratchpads, vertex vid is the
// (vid mod chunk)-th vertex of round (vid / (chunk*NUM_NODES)) of its home, so
//   line = (vid / (chunk*NUM_NODES)) * chunk + vid mod chunk.
// Every home thus fills its lines densely from 0, and the scratchpad is
// direct-mapped with one line per vertex and no tags. The index unit and the
// direct mapping follow the design; the formula is this implementation's
// reading of "interleaving with a chunk size". Purely combinational.
module index_unit
  import omega_pkg::*;
(
  input  logic [VID_W:0]    chunk,
  input  logic [VID_W-1:0]  vid,
  output logic [IDX_W-1:0]  line
);

  logic [VID_W:0]   c, q, r, round;
  logic [2*VID_W+1:0] l;

  always_comb begin
    c     = (chunk == '0) ? (VID_W+1)'(1) : chunk;
    q     = (VID_W+1)'(vid) / c;
    r     = (VID_W+1)'(vid) - q * c;
    round = q >> NODE_W;
    l     = round * c + (2*VID_W+2)'(r);
    line  = l[IDX_W-1:0];
  end

endmodule
