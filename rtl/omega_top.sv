// omega_top: the OMEGA memory subsystem of a 16-core chip multiprocessor.
//
// Natural graphs follow a power law: about a fifth of the vertices carry most
// of the edges, so most random vertex-property (vtxProp) accesses hit a small
// set of vertices. OMEGA keeps the vtxProp of those vertices (numbered first
// after an offline in-degree reordering) in per-core scratchpads that are
// accessed one word at a time, interleaved across all cores, and executes the
// atomic vertex updates in a small engine (PISC) next to each scratchpad.
// Everything else - the edge list, other data and the vtxProp of the remaining
// vertices - stays in the ordinary caches.
//
// This top instantiates NUM_NODES (16) nodes and two crossbars, one for
// requests and one for replies. The cores, caches, coherence and DRAM are not
// part of it: each node's core port, cache-path flag and sparse active-list
// port are brought out as arrays. The configuration bus and iter_end are
// broadcast to every node, as the framework configures all nodes alike. Node
// count and scratchpad size follow the design's main configuration; the
// port-level protocol is this implementation's (see sp_controller).
module omega_top
  import omega_pkg::*;
#(
  parameter int unsigned SP_LINES_P  = SP_LINES,
  parameter int unsigned SVB_ENTRIES = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  output logic                              init_done,
  input  logic                              cfg_we,
  input  logic [7:0]                        cfg_addr,
  input  logic [63:0]                       cfg_wdata,
  input  logic                              iter_end,
  input  logic      [NUM_NODES-1:0]         core_req_valid,
  output logic      [NUM_NODES-1:0]         core_req_ready,
  input  core_req_t [NUM_NODES-1:0]         core_req,
  output logic      [NUM_NODES-1:0]         core_to_cache,
  output logic      [NUM_NODES-1:0]         core_resp_valid,
  output logic      [NUM_NODES-1:0][DATA_W-1:0] core_resp_data,
  output logic      [NUM_NODES-1:0]         push_valid,
  input  logic      [NUM_NODES-1:0]         push_ready,
  output logic      [NUM_NODES-1:0][VID_W-1:0] push_vid,
  output ev_t       [NUM_NODES-1:0]         ev
);

  logic  [NUM_NODES-1:0] rq_out_valid, rq_out_ready, rq_in_valid, rq_in_ready;
  logic  [NUM_NODES-1:0] rs_out_valid, rs_out_ready, rs_in_valid, rs_in_ready;
  flit_t [NUM_NODES-1:0] rq_out_flit, rq_in_flit, rs_out_flit, rs_in_flit;
  logic  [NUM_NODES-1:0] node_init;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    omega_node #(.SP_LINES_P(SP_LINES_P), .SVB_ENTRIES(SVB_ENTRIES)) u_node (
      .clk, .rst_n, .my_node(NODE_W'(n)), .init_done(node_init[n]),
      .cfg_we, .cfg_addr, .cfg_wdata, .iter_end,
      .core_req_valid(core_req_valid[n]), .core_req_ready(core_req_ready[n]),
      .core_req(core_req[n]), .core_to_cache(core_to_cache[n]),
      .core_resp_valid(core_resp_valid[n]), .core_resp_data(core_resp_data[n]),
      .rq_out_valid(rq_out_valid[n]), .rq_out_ready(rq_out_ready[n]), .rq_out_flit(rq_out_flit[n]),
      .rq_in_valid(rq_in_valid[n]),   .rq_in_ready(rq_in_ready[n]),   .rq_in_flit(rq_in_flit[n]),
      .rs_out_valid(rs_out_valid[n]), .rs_out_ready(rs_out_ready[n]), .rs_out_flit(rs_out_flit[n]),
      .rs_in_valid(rs_in_valid[n]),   .rs_in_ready(rs_in_ready[n]),   .rs_in_flit(rs_in_flit[n]),
      .push_valid(push_valid[n]), .push_ready(push_ready[n]), .push_vid(push_vid[n]),
      .ev(ev[n])
    );
  end

  assign init_done = &node_init;

  xbar #(.N(NUM_NODES)) u_req_xbar (
    .clk, .rst_n,
    .in_valid(rq_out_valid), .in_flit(rq_out_flit), .in_ready(rq_out_ready),
    .out_valid(rq_in_valid), .out_flit(rq_in_flit), .out_ready(rq_in_ready)
  );

  xbar #(.N(NUM_NODES)) u_rsp_xbar (
    .clk, .rst_n,
    .in_valid(rs_out_valid), .in_flit(rs_out_flit), .in_ready(rs_out_ready),
    .out_valid(rs_in_valid), .out_flit(rs_in_flit), .out_ready(rs_in_ready)
  );

endmodule
