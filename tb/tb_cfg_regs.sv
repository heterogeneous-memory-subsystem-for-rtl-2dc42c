// tb_cfg_regs: writes the mapping registers over the configuration bus and
// checks every field of cfg, including the derived end addresses and Prop
// offsets, plus reset values, ignored foreign addresses and the chunk=0 guard.
module tb_cfg_regs;
  import omega_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] addr;
  logic [63:0] wdata;
  cfg_t cfg;
  int checks = 0, failures = 0;

  cfg_regs dut (.clk, .rst_n, .cfg_we(we), .cfg_addr(addr), .cfg_wdata(wdata), .cfg);

  always #5 clk = ~clk;

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset nvert", 64'(cfg.nvert), 0);
    chk("reset chunk", 64'(cfg.chunk), 1);
    for (int t = 0; t < 20; t++) begin
      logic [47:0] st [3];
      logic [3:0]  ts [3];
      logic [7:0]  sd [3];
      int nv, ch, np;
      nv = $urandom_range(1, 1 << VID_W);
      ch = $urandom_range(1, 4096);
      np = $urandom_range(1, 3);
      for (int k = 0; k < 3; k++) begin
        st[k] = {$urandom, $urandom} & 48'hFFFF_FFFF_FFF8;
        ts[k] = 4'($urandom_range(1, 8));
        sd[k] = 8'($urandom_range(1, 64));
        wr(CFG_START + 8'(k), 64'(st[k]));
        wr(CFG_TSIZE + 8'(k), 64'(ts[k]));
        wr(CFG_STRIDE + 8'(k), 64'(sd[k]));
      end
      wr(CFG_NVERT, 64'(nv));
      wr(CFG_CHUNK, 64'(ch));
      wr(CFG_NPROPS, 64'(np));
      wr(8'hC0, 64'hFFFF);                 // not a mapping register
      @(negedge clk);
      chk("nvert", 64'(cfg.nvert), 64'(nv));
      chk("chunk", 64'(cfg.chunk), 64'(ch));
      chk("nprops", 64'(cfg.nprops), 64'(np));
      for (int k = 0; k < 3; k++) begin
        int off;
        off = 0;
        for (int j = 0; j < k; j++) off += ts[j];
        chk("start", 64'(cfg.start_addr[k]), 64'(st[k]));
        chk("tsize", 64'(cfg.type_size[k]), 64'(ts[k]));
        chk("stride", 64'(cfg.stride[k]), 64'(sd[k]));
        chk("end", 64'(cfg.end_addr[k]), 64'((st[k] + 48'(nv) * 48'(sd[k])) & 48'hFFFF_FFFF_FFFF));
        chk("off", 64'(cfg.prop_off[k]), 64'(off));
      end
    end
    wr(CFG_CHUNK, 0);
    @(negedge clk);
    chk("chunk zero guard", 64'(cfg.chunk), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
