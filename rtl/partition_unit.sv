// partition_unit: finds the home scratchpad of a scratchpad-resident vertex.
//
// The vtxProp of the most-connected vertices is spread over all scratchpads
// by chunk interleaving: vertices [0, chunk) go to node 0, the next chunk to
// node 1, and so on, wrapping after NUM_NODES chunks. The chunk size is a
// configuration register so that it can match the chunk size of the
// framework's OpenMP static schedule; with matching chunks a thread's
// sequential sweep over vtxProp stays in its own scratchpad. The interleaving
// and the configurable chunk follow the design; the divider for an arbitrary
// chunk size is this implementation's choice.
//
// home = (vid / chunk) mod NUM_NODES, and is_local compares it with my_node.
// Purely combinational.
module partition_unit
  import omega_pkg::*;
(
  input  logic [VID_W:0]     chunk,
  input  logic [NODE_W-1:0]  my_node,
  input  logic [VID_W-1:0]   vid,
  output logic [NODE_W-1:0]  home,
  output logic               is_local
);

  logic [VID_W:0] q;

  always_comb begin
    q        = (VID_W+1)'(vid) / ((chunk == '0) ? (VID_W+1)'(1) : chunk);
    home     = q[NODE_W-1:0];
    is_local = (home == my_node);
  end

endmodule
