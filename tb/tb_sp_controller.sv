// tb_sp_controller: the scratchpad controller of node 0, wired to a reduced
// scratchpad, a PISC, a source vertex buffer and the configuration
// registers. The testbench plays the other 15 nodes on the crossbar ports:
// it answers remote reads from a reference table and injects requests of its
// own. Mapping: 64 resident vertices, chunk 2 (node 0 owns 0,1,32,33), Prop 0
// is an 8-byte double at 0x10000, Prop 1 a 4-byte word at 0x20000.
// Checked: the cache-path flag, local write/read and the 5-cycle local read
// latency, remote read/write/atomic packets, source-buffer fill, 1-cycle hit
// and flush, local and remote atomics, holding back a request for a vertex
// under update while the core's read of another vertex is served, read-and-clear of the active
// bit, and serving other nodes' requests with correct replies.
module tb_sp_controller;
  import omega_pkg::*;
  import omega_tb_pkg::*;
  localparam int L = 256;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [7:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0;
  cfg_t cfg;
  logic sp_ready;
  logic core_req_valid = 0, core_req_ready, core_to_cache, core_resp_valid;
  core_req_t core_req;
  logic [DATA_W-1:0] core_resp_data;
  logic rq_out_valid, rq_out_ready, rq_in_valid, rq_in_ready;
  logic rs_out_valid, rs_out_ready, rs_in_valid, rs_in_ready;
  flit_t rq_out_flit, rq_in_flit, rs_out_flit, rs_in_flit;
  logic [PROP_W-1:0] svb_lk_prop, svb_fill_prop;
  logic [VID_W-1:0] svb_lk_vid, svb_fill_vid;
  logic svb_hit, svb_fill_valid, iter_end = 0;
  logic [DATA_W-1:0] svb_data, svb_fill_data;
  logic sp_req_valid, sp_we, sp_rvalid;
  logic [IDX_W-1:0] sp_line;
  logic [LINE_BYTES-1:0] sp_wmask;
  logic [LINE_W-1:0] sp_wdata, sp_rdata;
  logic [MAX_PROPS-1:0] sp_act_we, sp_act_wdata, sp_ract;
  logic pisc_start, pisc_busy, pisc_wb_valid;
  logic [LINE_W-1:0] pisc_line, pisc_wb_line;
  logic [MAX_PROPS-1:0] pisc_act, pisc_wb_act;
  logic [DATA_W-1:0] pisc_operand;
  logic [OPT_W-1:0] pisc_optype;
  logic [VID_W-1:0] pisc_vid, push_vid;
  logic push_valid;
  ev_t ev;
  int checks = 0, failures = 0, cyc = 0;
  int n_block = 0, n_served = 0, n_served_busy = 0, rd33_cyc = 0, rs32_cyc = 0;

  cfg_regs u_cfg (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg);
  sp_controller dut (.clk, .rst_n, .my_node(4'd0), .cfg, .sp_ready,
    .core_req_valid, .core_req_ready, .core_req, .core_to_cache, .core_resp_valid, .core_resp_data,
    .rq_out_valid, .rq_out_ready, .rq_out_flit, .rq_in_valid, .rq_in_ready, .rq_in_flit,
    .rs_out_valid, .rs_out_ready, .rs_out_flit, .rs_in_valid, .rs_in_ready, .rs_in_flit,
    .svb_lk_prop, .svb_lk_vid, .svb_hit, .svb_data, .svb_fill_valid, .svb_fill_prop, .svb_fill_vid, .svb_fill_data,
    .sp_req_valid, .sp_line, .sp_we, .sp_wmask, .sp_wdata, .sp_act_we, .sp_act_wdata, .sp_rvalid, .sp_rdata, .sp_ract,
    .pisc_start, .pisc_line, .pisc_act, .pisc_operand, .pisc_optype, .pisc_vid, .pisc_busy,
    .pisc_wb_valid, .pisc_wb_line, .pisc_wb_act, .ev);
  scratchpad #(.LINES(L)) u_sp (.clk, .rst_n, .init_done(sp_ready), .req_valid(sp_req_valid), .line(sp_line),
    .we(sp_we), .wmask(sp_wmask), .wdata(sp_wdata), .act_we(sp_act_we), .act_wdata(sp_act_wdata),
    .rvalid(sp_rvalid), .rdata(sp_rdata), .ract(sp_ract));
  pisc u_pisc (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg, .start(pisc_start), .s_line(pisc_line),
    .s_act(pisc_act), .s_operand(pisc_operand), .s_optype(pisc_optype), .s_vid(pisc_vid), .busy(pisc_busy),
    .wb_valid(pisc_wb_valid), .wb_line(pisc_wb_line), .wb_act(pisc_wb_act),
    .push_valid, .push_ready(1'b1), .push_vid);
  src_vertex_buffer u_svb (.clk, .rst_n, .flush(iter_end), .lk_prop(svb_lk_prop), .lk_vid(svb_lk_vid),
    .lk_hit(svb_hit), .lk_data(svb_data), .fill_valid(svb_fill_valid), .fill_prop(svb_fill_prop),
    .fill_vid(svb_fill_vid), .fill_data(svb_fill_data));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- remote nodes
  flit_t got_rq [$];           // packets node 0 sent
  flit_t got_rs [$];           // replies node 0 sent
  int    rs_delay;
  flit_t pend_q [$];
  function automatic logic [63:0] remote_val(input flit_t f);
    return 64'h5000_0000 + 64'(f.vid) * 16 + 64'(f.prop);
  endfunction
  assign rq_out_ready = 1'b1;
  always @(posedge clk) rs_out_ready <= ($urandom_range(0, 1) == 1);
  always @(posedge clk) if (!rst_n) rs_in_valid <= 0; else begin
    rs_in_valid <= 0;
    if (rq_out_valid) begin
      got_rq.push_back(rq_out_flit);
      if (rq_out_flit.kind inside {PK_RD, PK_RDSRC, PK_RDACT}) begin
        pend_q.push_back(rq_out_flit);
        rs_delay = 6;
      end
    end
    if (rs_delay > 0) rs_delay--;
    else if (pend_q.size() > 0) begin
      flit_t f, r;
      f = pend_q.pop_front();
      r = '0; r.kind = PK_RESP; r.dst = f.src; r.src = f.dst; r.vid = f.vid; r.prop = f.prop;
      r.data = remote_val(f);
      rs_in_valid <= 1;
      rs_in_flit  <= r;
    end
    if (rs_out_valid && rs_out_ready) begin
      got_rs.push_back(rs_out_flit);
      if (rs_out_flit.vid == 32) rs32_cyc = cyc;
    end
    n_block  += ev.block;
    n_served += ev.served_remote;
    if (ev.served_remote && pisc_busy) n_served_busy++;
  end

  // ------------------------------------------------------------- helpers
  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  function automatic logic [47:0] pa(input int prop, input int vid);
    return (prop == 0) ? 48'h10000 + 48'(vid * 8) : 48'h20000 + 48'(vid * 4);
  endfunction
  // issue one core request; returns the accept cycle and whether it went to the cache
  task automatic core(input op_e op, input int prop, input int vid, input logic [63:0] d,
                      input int optype, output int acc_cyc, output bit to_cache);
    @(negedge clk);
    core_req_valid = 1;
    core_req.op = op; core_req.addr = pa(prop, vid); core_req.data = d; core_req.optype = OPT_W'(optype);
    #1;
    while (!core_req_ready) begin @(negedge clk); #1; end
    acc_cyc = cyc; to_cache = core_to_cache;
    @(negedge clk);
    core_req_valid = 0;
  endtask
  task automatic core_rd(input op_e op, input int prop, input int vid, output logic [63:0] d, output int lat);
    int c; bit tc;
    core(op, prop, vid, 0, 0, c, tc);
    while (!core_resp_valid) @(negedge clk);
    d = core_resp_data; lat = cyc - c;
  endtask
  task automatic send_rq(input pkind_e k, input int src, input int prop, input int vid, input logic [63:0] d, input int optype);
    flit_t f;
    f = '0; f.kind = k; f.dst = 0; f.src = NODE_W'(src); f.prop = PROP_W'(prop); f.vid = VID_W'(vid);
    f.line = IDX_W'((vid / 32) * 2 + vid % 2); f.data = d; f.optype = OPT_W'(optype);
    @(negedge clk);
    rq_in_valid = 1; rq_in_flit = f;
    #1;
    while (!rq_in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    rq_in_valid = 0;
  endtask

  initial begin
    logic [63:0] d;
    int lat, c, n;
    bit tc;
    core_req = '0; rq_in_valid = 0; rq_in_flit = '0; rs_delay = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < UCODE_DEPTH; j++) wr(CFG_UCODE + 8'(j), prog(j));
    for (int t = 0; t < 4; t++) wr(CFG_ENTRY + 8'(t), 64'(entry_of(t)));
    wr(CFG_START + 0, 64'h10000); wr(CFG_TSIZE + 0, 8); wr(CFG_STRIDE + 0, 8);
    wr(CFG_START + 1, 64'h20000); wr(CFG_TSIZE + 1, 4); wr(CFG_STRIDE + 1, 4);
    wr(CFG_NVERT, 64); wr(CFG_CHUNK, 2); wr(CFG_NPROPS, 2);
    while (!sp_ready) @(negedge clk);

    // not resident -> cache path
    core(OP_RD, 0, 70, 0, 0, c, tc);
    chk("vertex 70 goes to cache", 64'(tc), 1);
    core(OP_RD, 0, 33, 0, 0, c, tc);
    chk("vertex 33 is resident", 64'(tc), 0);
    while (!core_resp_valid) @(negedge clk);
    chk("cleared line reads 0", core_resp_data, 0);

    // local write then read, latency
    core(OP_WR, 0, 1, $realtobits(1.5), 0, c, tc);
    core(OP_WR, 1, 1, 64'hDEAD_BEEF, 0, c, tc);
    core_rd(OP_RD, 0, 1, d, lat);
    chk("local read prop0", d, $realtobits(1.5));
    chk("local read latency", 64'(lat), 5);
    core_rd(OP_RD, 1, 1, d, lat);
    chk("local read prop1", d, 64'hDEAD_BEEF);

    // remote read: vertex 5 lives on node 2, line 1
    n = got_rq.size();
    core_rd(OP_RD, 1, 5, d, lat);
    chk("remote read data", d, 64'h5000_0000 + 5 * 16 + 1);
    chk("remote packet sent", 64'(got_rq.size() - n), 1);
    chk("remote packet dst", 64'(got_rq[n].dst), 2);
    chk("remote packet line", 64'(got_rq[n].line), 1);
    chk("remote packet kind", 64'(got_rq[n].kind), 64'(PK_RD));

    // source vertex buffer
    n = got_rq.size();
    core_rd(OP_RD_SRC, 0, 7, d, lat);
    chk("src read remote", d, 64'h5000_0000 + 7 * 16);
    core_rd(OP_RD_SRC, 0, 7, d, lat);
    chk("src read from buffer", d, 64'h5000_0000 + 7 * 16);
    chk("buffer hit latency", 64'(lat), 1);
    chk("one packet for two src reads", 64'(got_rq.size() - n), 1);
    core_rd(OP_RD, 0, 7, d, lat);
    chk("plain read bypasses buffer", 64'(got_rq.size() - n), 2);
    @(negedge clk); iter_end = 1; @(negedge clk); iter_end = 0;
    core_rd(OP_RD_SRC, 0, 7, d, lat);
    chk("after flush goes remote", 64'(got_rq.size() - n), 3);
    core_rd(OP_RD_SRC, 1, 0, d, lat);
    chk("local src read not buffered", d, 0);

    // remote write and atomic are posted
    n = got_rq.size();
    core(OP_WR, 0, 9, 64'h77, 0, c, tc);
    core(OP_ATOMIC, 0, 9, $realtobits(2.0), T_PR, c, tc);
    repeat (3) @(negedge clk);
    chk("posted packets", 64'(got_rq.size() - n), 2);
    chk("atomic packet kind", 64'(got_rq[n+1].kind), 64'(PK_AT));
    chk("atomic operand", got_rq[n+1].data, $realtobits(2.0));

    // local atomic (PageRank add) on vertex 1
    core(OP_ATOMIC, 0, 1, $realtobits(2.25), T_PR, c, tc);
    core_rd(OP_RD, 0, 1, d, lat);
    chk("local atomic result", d, $realtobits(3.75));

    // blocking: atomic on vertex 32 from core, then another node reads 32
    // and 33; 33 may pass, 32 must wait for the update
    core(OP_WR, 0, 32, $realtobits(10.0), 0, c, tc);
    core(OP_WR, 0, 33, $realtobits(20.0), 0, c, tc);
    repeat (3) @(negedge clk);
    n = got_rs.size();
    fork
      begin
        core(OP_ATOMIC, 0, 32, $realtobits(0.5), T_PR, c, tc);
        core_rd(OP_RD, 0, 33, d, lat);
        rd33_cyc = cyc;
        chk("read of other vertex during update", d, $realtobits(20.0));
      end
      begin
        repeat (2) @(negedge clk);
        send_rq(PK_RD, 5, 0, 32, 0, 0);
      end
    join
    repeat (30) @(negedge clk);
    chk("one reply", 64'(got_rs.size() - n), 1);
    if (got_rs.size() - n == 1) begin
      chk("blocked vertex sees update", got_rs[n].data, $realtobits(10.5));
      chk("reply dst", 64'(got_rs[n].dst), 5);
    end
    chk("block happened", 64'(n_block > 0), 1);
    chk("other vertex answered before blocked one", 64'(rd33_cyc < rs32_cyc), 1);

    // CC atomic from another node sets the active bit; read-and-clear
    send_rq(PK_WR, 3, 0, 0, 64'd100, 0);
    send_rq(PK_AT, 3, 0, 0, 64'd40, T_CC);
    repeat (20) @(negedge clk);
    core_rd(OP_RD_ACT, 0, 0, d, lat);
    chk("active bit set by atomic", d, 1);
    core_rd(OP_RD_ACT, 0, 0, d, lat);
    chk("active bit cleared by read", d, 0);
    core_rd(OP_RD, 0, 0, d, lat);
    chk("CC min applied", d, 40);

    // remote write + read served for another node
    n = got_rs.size();
    send_rq(PK_WR, 9, 1, 33, 64'h1234_5678, 0);
    send_rq(PK_RD, 9, 1, 33, 0, 0);
    repeat (20) @(negedge clk);
    chk("served reply", got_rs[n].data, 64'h1234_5678);
    chk("served reply dst", 64'(got_rs[n].dst), 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
