// omega_node: what OMEGA adds to one core of the chip multiprocessor.
//
// A node joins the scratchpad controller (with its monitor, partition and
// index units), the configuration registers, the 1 MB direct-mapped
// scratchpad, the PISC atomic engine and the source vertex buffer. The core,
// its L1 caches and its L2 slice are not part of this block: the core talks to
// the node through a word-granular request port, and accesses the node does
// not own are flagged back (core_to_cache) for the ordinary cache path.
// Sparse active-list entries leave through push_* towards the L1 data cache.
// Which units form a node follows the design; the port protocol is this
// implementation's (see sp_controller for the timing).
//
// The scratchpad clears itself after reset (SP_LINES cycles); init_done
// rises when the node is ready. iter_end flushes the source vertex buffer at
// the end of an algorithm iteration.
module omega_node
  import omega_pkg::*;
#(
  parameter int unsigned SP_LINES_P  = SP_LINES,
  parameter int unsigned SVB_ENTRIES = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_W-1:0]      my_node,
  output logic                   init_done,
  // configuration bus (broadcast by the framework)
  input  logic                   cfg_we,
  input  logic [7:0]             cfg_addr,
  input  logic [63:0]            cfg_wdata,
  input  logic                   iter_end,
  // core port
  input  logic                   core_req_valid,
  output logic                   core_req_ready,
  input  core_req_t              core_req,
  output logic                   core_to_cache,
  output logic                   core_resp_valid,
  output logic [DATA_W-1:0]      core_resp_data,
  // crossbars
  output logic                   rq_out_valid,
  input  logic                   rq_out_ready,
  output flit_t                  rq_out_flit,
  input  logic                   rq_in_valid,
  output logic                   rq_in_ready,
  input  flit_t                  rq_in_flit,
  output logic                   rs_out_valid,
  input  logic                   rs_out_ready,
  output flit_t                  rs_out_flit,
  input  logic                   rs_in_valid,
  output logic                   rs_in_ready,
  input  flit_t                  rs_in_flit,
  // sparse active list towards the L1 data cache
  output logic                   push_valid,
  input  logic                   push_ready,
  output logic [VID_W-1:0]       push_vid,
  output ev_t                    ev
);

  cfg_t cfg;

  logic [PROP_W-1:0]     svb_lk_prop, svb_fill_prop;
  logic [VID_W-1:0]      svb_lk_vid, svb_fill_vid;
  logic                  svb_hit, svb_fill_valid;
  logic [DATA_W-1:0]     svb_data, svb_fill_data;

  logic                  sp_req_valid, sp_we, sp_rvalid;
  logic [IDX_W-1:0]      sp_line;
  logic [LINE_BYTES-1:0] sp_wmask;
  logic [LINE_W-1:0]     sp_wdata, sp_rdata;
  logic [MAX_PROPS-1:0]  sp_act_we, sp_act_wdata, sp_ract;

  logic                  pisc_start, pisc_busy, pisc_wb_valid;
  logic [LINE_W-1:0]     pisc_line, pisc_wb_line;
  logic [MAX_PROPS-1:0]  pisc_act, pisc_wb_act;
  logic [DATA_W-1:0]     pisc_operand;
  logic [OPT_W-1:0]      pisc_optype;
  logic [VID_W-1:0]      pisc_vid;

  cfg_regs u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg(cfg)
  );

  sp_controller u_ctl (
    .clk, .rst_n, .my_node, .cfg, .sp_ready(init_done),
    .core_req_valid, .core_req_ready, .core_req, .core_to_cache,
    .core_resp_valid, .core_resp_data,
    .rq_out_valid, .rq_out_ready, .rq_out_flit,
    .rq_in_valid, .rq_in_ready, .rq_in_flit,
    .rs_out_valid, .rs_out_ready, .rs_out_flit,
    .rs_in_valid, .rs_in_ready, .rs_in_flit,
    .svb_lk_prop, .svb_lk_vid, .svb_hit, .svb_data,
    .svb_fill_valid, .svb_fill_prop, .svb_fill_vid, .svb_fill_data,
    .sp_req_valid, .sp_line, .sp_we, .sp_wmask, .sp_wdata, .sp_act_we, .sp_act_wdata,
    .sp_rvalid, .sp_rdata, .sp_ract,
    .pisc_start, .pisc_line, .pisc_act, .pisc_operand, .pisc_optype, .pisc_vid,
    .pisc_busy, .pisc_wb_valid, .pisc_wb_line, .pisc_wb_act,
    .ev
  );

  scratchpad #(.LINES(SP_LINES_P)) u_sp (
    .clk, .rst_n, .init_done,
    .req_valid(sp_req_valid), .line(sp_line), .we(sp_we), .wmask(sp_wmask), .wdata(sp_wdata),
    .act_we(sp_act_we), .act_wdata(sp_act_wdata),
    .rvalid(sp_rvalid), .rdata(sp_rdata), .ract(sp_ract)
  );

  pisc u_pisc (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg,
    .start(pisc_start), .s_line(pisc_line), .s_act(pisc_act), .s_operand(pisc_operand),
    .s_optype(pisc_optype), .s_vid(pisc_vid), .busy(pisc_busy),
    .wb_valid(pisc_wb_valid), .wb_line(pisc_wb_line), .wb_act(pisc_wb_act),
    .push_valid, .push_ready, .push_vid
  );

  src_vertex_buffer #(.ENTRIES(SVB_ENTRIES)) u_svb (
    .clk, .rst_n, .flush(iter_end),
    .lk_prop(svb_lk_prop), .lk_vid(svb_lk_vid), .lk_hit(svb_hit), .lk_data(svb_data),
    .fill_valid(svb_fill_valid), .fill_prop(svb_fill_prop), .fill_vid(svb_fill_vid),
    .fill_data(svb_fill_data)
  );

endmodule
