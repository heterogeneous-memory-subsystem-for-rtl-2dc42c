// sp_controller: the scratchpad controller of one OMEGA node.
//
// It sits between the core and the rest of the memory system and steers each
// vtxProp access:
//   * Monitor unit: an access outside the scratchpad-resident part of every
//     configured vtxProp is left to the ordinary cache hierarchy
//     (core_to_cache pulses in the accept cycle; nothing else happens here).
//   * Partition unit: a resident access goes to the local scratchpad or, as a
//     one-flit packet over the request crossbar, to the home node.
//   * Index unit: gives the line of the vertex in its home scratchpad.
//   * Source vertex buffer: a source-vertex read (OP_RD_SRC) whose home is
//     remote is first looked up there and, on a miss, fills it with the reply.
//   * Atomics: the controller reads the line, hands it to the PISC, and
//     writes the PISC's result back; meanwhile every request for that vertex
//     is held back (ev.block), while requests for other vertices proceed.
// The structure above follows the design. This implementation's own choices:
// a single scratchpad port shared round-robin between the local core and
// requests arriving from other nodes, with the PISC write-back taking
// priority; one outstanding read per core (reads of the core port are
// answered in order, with no tag); writes and atomics are posted (no reply);
// remote requests are served from a one-entry slot and answered through a
// 4-entry reply queue over a second crossbar; OP_RD_ACT, a read-and-clear of
// a dense active-list bit, lets the framework collect the next frontier.
//
// Requests from other nodes enter through a single slot and are taken in
// arrival order, so a remote request held back by an update also holds the
// remote requests behind it; the core's own requests pass it.
//
// Timing: a local read answers SP_LAT+2 = 5 cycles after the cycle it is
// accepted in (slot, 3-cycle scratchpad, reply register) when the port is
// free; a source-buffer hit answers in the next cycle.
module sp_controller
  import omega_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_W-1:0]      my_node,
  input  cfg_t                   cfg,
  input  logic                   sp_ready,
  // core port
  input  logic                   core_req_valid,
  output logic                   core_req_ready,
  input  core_req_t              core_req,
  output logic                   core_to_cache,
  output logic                   core_resp_valid,
  output logic [DATA_W-1:0]      core_resp_data,
  // request crossbar
  output logic                   rq_out_valid,
  input  logic                   rq_out_ready,
  output flit_t                  rq_out_flit,
  input  logic                   rq_in_valid,
  output logic                   rq_in_ready,
  input  flit_t                  rq_in_flit,
  // reply crossbar
  output logic                   rs_out_valid,
  input  logic                   rs_out_ready,
  output flit_t                  rs_out_flit,
  input  logic                   rs_in_valid,
  output logic                   rs_in_ready,
  input  flit_t                  rs_in_flit,
  // source vertex buffer
  output logic [PROP_W-1:0]      svb_lk_prop,
  output logic [VID_W-1:0]       svb_lk_vid,
  input  logic                   svb_hit,
  input  logic [DATA_W-1:0]      svb_data,
  output logic                   svb_fill_valid,
  output logic [PROP_W-1:0]      svb_fill_prop,
  output logic [VID_W-1:0]       svb_fill_vid,
  output logic [DATA_W-1:0]      svb_fill_data,
  // scratchpad
  output logic                   sp_req_valid,
  output logic [IDX_W-1:0]       sp_line,
  output logic                   sp_we,
  output logic [LINE_BYTES-1:0]  sp_wmask,
  output logic [LINE_W-1:0]      sp_wdata,
  output logic [MAX_PROPS-1:0]   sp_act_we,
  output logic [MAX_PROPS-1:0]   sp_act_wdata,
  input  logic                   sp_rvalid,
  input  logic [LINE_W-1:0]      sp_rdata,
  input  logic [MAX_PROPS-1:0]   sp_ract,
  // PISC
  output logic                   pisc_start,
  output logic [LINE_W-1:0]      pisc_line,
  output logic [MAX_PROPS-1:0]   pisc_act,
  output logic [DATA_W-1:0]      pisc_operand,
  output logic [OPT_W-1:0]       pisc_optype,
  output logic [VID_W-1:0]       pisc_vid,
  input  logic                   pisc_busy,
  input  logic                   pisc_wb_valid,
  input  logic [LINE_W-1:0]      pisc_wb_line,
  input  logic [MAX_PROPS-1:0]   pisc_wb_act,
  // activity
  output ev_t                    ev
);

  localparam int unsigned RQ_DEPTH = 4;   // reply queue for remote reads

  typedef struct packed {
    logic               v;
    pkind_e             kind;
    logic               remote;  // came from another node
    logic [NODE_W-1:0]  src;
    logic [PROP_W-1:0]  prop;
    logic [OPT_W-1:0]   optype;
    logic [VID_W-1:0]   vid;
    logic [IDX_W-1:0]   line;
    logic [DATA_W-1:0]  data;
  } lop_t;

  // ------------------------------------------------------------- helpers
  function automatic pkind_e op2kind(input op_e op);
    unique case (op)
      OP_RD:     return PK_RD;
      OP_WR:     return PK_WR;
      OP_RD_SRC: return PK_RDSRC;
      OP_ATOMIC: return PK_AT;
      OP_RD_ACT: return PK_RDACT;
      default:   return PK_RD;
    endcase
  endfunction

  function automatic logic is_read(input pkind_e k);
    return (k == PK_RD) || (k == PK_RDSRC) || (k == PK_RDACT);
  endfunction

  function automatic logic [63:0] size_mask(input logic [3:0] n);
    return (n >= 4'd8) ? '1 : ((64'd1 << (8 * n)) - 64'd1);
  endfunction

  // --------------------------------------------------------- core decode
  logic              mon_hit;
  logic [PROP_W-1:0] mon_prop;
  logic [VID_W-1:0]  mon_vid;
  logic [NODE_W-1:0] home;
  logic              is_local;
  logic [IDX_W-1:0]  line;

  monitor_unit   u_mon  (.cfg(cfg), .addr(core_req.addr), .hit(mon_hit), .prop(mon_prop), .vid(mon_vid));
  partition_unit u_part (.chunk(cfg.chunk), .my_node(my_node), .vid(mon_vid), .home(home), .is_local(is_local));
  index_unit     u_idx  (.chunk(cfg.chunk), .vid(mon_vid), .line(line));

  assign svb_lk_prop = mon_prop;
  assign svb_lk_vid  = mon_vid;

  lop_t   cslot, nslot;          // one pending local op from the core / from the network
  logic   rqo_v;
  flit_t  rqo;
  logic   rd_pend;               // core read outstanding
  logic   pend_src;              // ...and it is a remote source read
  logic [PROP_W-1:0] pend_prop;
  logic [VID_W-1:0]  pend_vid;
  logic   cresp_v;
  logic [DATA_W-1:0] cresp_d;

  logic   c_svb, c_local, c_remote, c_acc;

  always_comb begin
    c_svb    = mon_hit && !is_local && core_req.op == OP_RD_SRC && svb_hit;
    c_local  = mon_hit && is_local;
    c_remote = mon_hit && !is_local && !c_svb;
    core_req_ready = sp_ready && !rd_pend &&
                     (!mon_hit || c_svb || (c_local && !cslot.v) || (c_remote && !rqo_v));
    c_acc         = core_req_valid && core_req_ready;
    core_to_cache = c_acc && !mon_hit;
  end

  // ------------------------------------------------------------- issue
  logic             atomic_busy;
  logic [IDX_W-1:0] atomic_line;
  lop_t [SP_LAT-1:0] tagp;        // ops in the scratchpad read pipeline
  logic [$clog2(RQ_DEPTH+1)-1:0] rq_cnt, rq_inflight;
  logic             rr;           // 1: network slot has priority
  logic             el_c, el_n, blk_c, blk_n, go_c, go_n;
  lop_t             iss;

  always_comb begin
    rq_inflight = '0;
    for (int s = 0; s < SP_LAT; s++)
      if (tagp[s].v && tagp[s].remote && is_read(tagp[s].kind)) rq_inflight++;
  end

  always_comb begin
    blk_c = cslot.v && atomic_busy && cslot.line == atomic_line;
    blk_n = nslot.v && atomic_busy && nslot.line == atomic_line;
    el_c  = cslot.v && sp_ready && !pisc_wb_valid && !blk_c &&
            !(cslot.kind == PK_AT && atomic_busy);
    el_n  = nslot.v && sp_ready && !pisc_wb_valid && !blk_n &&
            !(nslot.kind == PK_AT && atomic_busy) &&
            !(is_read(nslot.kind) && (32'(rq_cnt) + 32'(rq_inflight) >= RQ_DEPTH));
    go_n  = el_n && (rr || !el_c);
    go_c  = el_c && !go_n;
    iss   = go_n ? nslot : cslot;

    sp_req_valid = 1'b0;
    sp_line      = iss.line;
    sp_we        = 1'b0;
    sp_wmask     = '0;
    sp_wdata     = '0;
    sp_act_we    = '0;
    sp_act_wdata = '0;
    if (pisc_wb_valid) begin
      sp_req_valid = 1'b1;
      sp_line      = atomic_line;
      sp_we        = 1'b1;
      sp_wmask     = '1;
      sp_wdata     = pisc_wb_line;
      sp_act_we    = '1;
      sp_act_wdata = pisc_wb_act;
    end else if (go_c || go_n) begin
      sp_req_valid = 1'b1;
      if (iss.kind == PK_WR && iss.prop < PROP_W'(MAX_PROPS)) begin
        sp_we    = 1'b1;
        sp_wmask = LINE_BYTES'(size_mask(cfg.type_size[iss.prop])) << cfg.prop_off[iss.prop];
        sp_wdata = LINE_W'(iss.data) << (8 * cfg.prop_off[iss.prop]);
      end
      if (iss.kind == PK_RDACT && iss.prop < PROP_W'(MAX_PROPS))
        sp_act_we[iss.prop] = 1'b1;      // read-and-clear
    end
  end

  // -------------------------------------------------- scratchpad replies
  lop_t        rt;          // op whose read data arrives now
  logic [63:0] rval;

  always_comb begin
    rt   = tagp[SP_LAT-1];
    rval = '0;
    if (rt.prop < PROP_W'(MAX_PROPS)) begin
      if (rt.kind == PK_RDACT) rval = 64'(sp_ract[rt.prop]);
      else rval = 64'(sp_rdata >> (8 * cfg.prop_off[rt.prop])) & size_mask(cfg.type_size[rt.prop]);
    end
    pisc_start   = sp_rvalid && rt.v && rt.kind == PK_AT;
    pisc_line    = sp_rdata;
    pisc_act     = sp_ract;
    pisc_operand = rt.data;
    pisc_optype  = rt.optype;
    pisc_vid     = rt.vid;
  end

  // reply queue
  flit_t [RQ_DEPTH-1:0] rqq;
  logic [$clog2(RQ_DEPTH)-1:0] rq_head, rq_tail;
  logic rq_push, rq_pop;
  flit_t rq_new;

  always_comb begin
    rq_push = sp_rvalid && rt.v && rt.remote && is_read(rt.kind);
    rq_new        = '0;
    rq_new.kind   = PK_RESP;
    rq_new.dst    = rt.src;
    rq_new.src    = my_node;
    rq_new.prop   = rt.prop;
    rq_new.vid    = rt.vid;
    rq_new.line   = rt.line;
    rq_new.data   = rval;
    rs_out_valid  = (rq_cnt != '0);
    rs_out_flit   = rqq[rq_head];
    rq_pop        = rs_out_valid && rs_out_ready;
  end

  assign rs_in_ready  = 1'b1;
  assign rq_in_ready  = !nslot.v;
  assign rq_out_valid = rqo_v;
  assign rq_out_flit  = rqo;
  assign core_resp_valid = cresp_v;
  assign core_resp_data  = cresp_d;

  always_comb begin
    svb_fill_valid = rs_in_valid && pend_src;
    svb_fill_prop  = pend_prop;
    svb_fill_vid   = pend_vid;
    svb_fill_data  = rs_in_flit.data;
  end

  // -------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cslot       <= '0;
      nslot       <= '0;
      rqo_v       <= 1'b0;
      rqo         <= '0;
      rd_pend     <= 1'b0;
      pend_src    <= 1'b0;
      pend_prop   <= '0;
      pend_vid    <= '0;
      cresp_v     <= 1'b0;
      cresp_d     <= '0;
      atomic_busy <= 1'b0;
      atomic_line <= '0;
      tagp        <= '0;
      rqq         <= '0;
      rq_head     <= '0;
      rq_tail     <= '0;
      rq_cnt      <= '0;
      rr          <= 1'b0;
    end else begin
      cresp_v <= 1'b0;

      // core accept
      if (c_acc && mon_hit) begin
        if (core_req.op != OP_WR && core_req.op != OP_ATOMIC) rd_pend <= 1'b1;
        pend_src  <= c_remote && core_req.op == OP_RD_SRC;
        pend_prop <= mon_prop;
        pend_vid  <= mon_vid;
        if (c_svb) begin
          cresp_v <= 1'b1;
          cresp_d <= svb_data;
        end else if (c_local) begin
          cslot.v      <= 1'b1;
          cslot.kind   <= op2kind(core_req.op);
          cslot.remote <= 1'b0;
          cslot.src    <= my_node;
          cslot.prop   <= mon_prop;
          cslot.optype <= core_req.optype;
          cslot.vid    <= mon_vid;
          cslot.line   <= line;
          cslot.data   <= core_req.data;
        end else begin
          rqo_v       <= 1'b1;
          rqo         <= '0;
          rqo.kind    <= op2kind(core_req.op);
          rqo.dst     <= home;
          rqo.src     <= my_node;
          rqo.prop    <= mon_prop;
          rqo.optype  <= core_req.optype;
          rqo.vid     <= mon_vid;
          rqo.line    <= line;
          rqo.data    <= core_req.data;
        end
      end
      if (rqo_v && rq_out_ready) rqo_v <= 1'b0;

      // request from another node
      if (rq_in_valid && rq_in_ready) begin
        nslot.v      <= 1'b1;
        nslot.kind   <= rq_in_flit.kind;
        nslot.remote <= 1'b1;
        nslot.src    <= rq_in_flit.src;
        nslot.prop   <= rq_in_flit.prop;
        nslot.optype <= rq_in_flit.optype;
        nslot.vid    <= rq_in_flit.vid;
        nslot.line   <= rq_in_flit.line;
        nslot.data   <= rq_in_flit.data;
      end

      // issue
      if (go_c) cslot.v <= 1'b0;
      if (go_n) nslot.v <= 1'b0;
      if (go_c && el_n) rr <= 1'b1;
      if (go_n && el_c) rr <= 1'b0;
      tagp[0] <= (go_c || go_n) && !pisc_wb_valid && iss.kind != PK_WR ? iss : '0;
      for (int s = 1; s < SP_LAT; s++) tagp[s] <= tagp[s-1];
      if ((go_c || go_n) && iss.kind == PK_AT) begin
        atomic_busy <= 1'b1;
        atomic_line <= iss.line;
      end
      if (pisc_wb_valid) atomic_busy <= 1'b0;

      // scratchpad read data
      if (sp_rvalid && rt.v && !rt.remote && is_read(rt.kind)) begin
        cresp_v <= 1'b1;
        cresp_d <= rval;
      end

      // reply queue
      if (rq_push) begin
        rqq[rq_tail] <= rq_new;
        rq_tail      <= rq_tail + 1'b1;
      end
      if (rq_pop) rq_head <= rq_head + 1'b1;
      rq_cnt <= rq_cnt + $bits(rq_cnt)'(rq_push) - $bits(rq_cnt)'(rq_pop);

      // reply from another node
      if (rs_in_valid) begin
        cresp_v  <= 1'b1;
        cresp_d  <= rs_in_flit.data;
        pend_src <= 1'b0;
      end

      if (cresp_v) rd_pend <= 1'b0;
    end
  end

  always_comb begin
    ev               = '0;
    ev.to_cache      = core_to_cache;
    ev.local_acc     = c_acc && c_local;
    ev.remote_acc    = c_acc && c_remote;
    ev.served_remote = go_n && !pisc_wb_valid;
    ev.svb_hit       = c_acc && c_svb;
    ev.svb_fill      = svb_fill_valid;
    ev.atomic        = pisc_start;
    ev.block         = blk_c || blk_n;
  end

  // --------------------------------------------------------- assertions
  a_pisc_idle: assert property (@(posedge clk) disable iff (!rst_n) pisc_start |-> !pisc_busy);
  a_resp_pend: assert property (@(posedge clk) disable iff (!rst_n) rs_in_valid |-> rd_pend);
  a_rq_space:  assert property (@(posedge clk) disable iff (!rst_n) rq_push |-> 32'(rq_cnt) < RQ_DEPTH || rq_pop);

endmodule
