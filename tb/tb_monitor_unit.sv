// tb_monitor_unit: random vtxProp layouts (separate arrays and interleaved
// struct fields) and addresses inside, at the edges of and outside the
// resident ranges; the expected hit/Prop/vertex ID comes from a search over
// all vertices of each Prop.
module tb_monitor_unit;
  import omega_pkg::*;
  cfg_t cfg;
  logic [ADDR_W-1:0] addr;
  logic hit;
  logic [PROP_W-1:0] prop;
  logic [VID_W-1:0] vid;
  int checks = 0, failures = 0;

  monitor_unit dut (.cfg, .addr, .hit, .prop, .vid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nhit = 0;
    for (int t = 0; t < 40; t++) begin
      int nv;
      logic [47:0] base;
      bit as_struct;
      cfg = '0;
      nv = $urandom_range(1, 300);
      base = 48'h1000_0000 + 48'($urandom_range(0, 1000) * 64);
      as_struct = (t % 2 == 1);
      cfg.nprops = 2'($urandom_range(1, 3));
      cfg.nvert  = (VID_W+1)'(nv);
      for (int k = 0; k < 3; k++) begin
        cfg.type_size[k] = 4;
        if (as_struct) begin
          cfg.stride[k]     = 12;               // struct {a,b,c} of 4-byte fields
          cfg.start_addr[k] = base + 48'(4 * k);
        end else begin
          cfg.stride[k]     = 8'((k == 1) ? 4 : 8);
          cfg.start_addr[k] = base + 48'(k * 65536);
        end
        cfg.end_addr[k] = cfg.start_addr[k] + 48'(nv) * 48'(cfg.stride[k]);
      end
      for (int i = 0; i < 200; i++) begin
        bit e_hit;
        int e_prop, e_vid;
        int k0;
        k0 = $urandom_range(0, 2);
        case ($urandom_range(0, 3))
          0: addr = cfg.start_addr[k0] + 48'($urandom_range(0, nv + 3) * cfg.stride[k0]);
          1: addr = cfg.start_addr[k0] + 48'($urandom_range(0, nv * cfg.stride[k0] + 40)) - 48'd8;
          2: addr = cfg.end_addr[k0] - 48'(cfg.stride[k0]);
          default: addr = cfg.end_addr[k0];
        endcase
        e_hit = 0; e_prop = 0; e_vid = 0;
        for (int k = 0; k < int'(cfg.nprops) && !e_hit; k++)
          for (int v = 0; v < nv; v++)
            if (addr == cfg.start_addr[k] + 48'(v) * 48'(cfg.stride[k])) begin
              e_hit = 1; e_prop = k; e_vid = v;
            end
        #1;
        checks++;
        if (hit !== e_hit || (e_hit && (int'(prop) != e_prop || int'(vid) != e_vid))) begin
          failures++;
          if (failures < 10) $display("FAIL addr %h: hit %0d prop %0d vid %0d, expected %0d %0d %0d",
                                      addr, hit, prop, vid, e_hit, e_prop, e_vid);
        end
        nhit += e_hit;
      end
    end
    checks++;
    if (nhit < 1000) begin failures++; $display("FAIL too few hits %0d", nhit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
