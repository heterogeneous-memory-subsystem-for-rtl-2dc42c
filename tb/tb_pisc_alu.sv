// tb_pisc_alu: every ALU function and compare on random and edge operands
// against reference expressions (the fp add against the simulator's double
// arithmetic).
module tb_pisc_alu;
  import omega_pkg::*;
  fn_e fn;
  logic [63:0] a, b, y;
  logic flag;
  int checks = 0, failures = 0;

  pisc_alu dut (.fn, .a, .b, .y, .flag);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [63:0] ey;
      logic ef;
      fn = fn_e'($urandom_range(0, 5));
      case ($urandom_range(0, 3))
        0: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
        1: begin a = 64'($signed($urandom_range(0, 20)) - 10); b = 64'($signed($urandom_range(0, 20)) - 10); end
        2: begin a = $realtobits(real'($urandom_range(0, 1000)) / 7.0); b = $realtobits(real'($urandom_range(0, 1000)) / 3.0); end
        default: begin a = {$urandom, $urandom}; b = a; end
      endcase
      if (fn == F_FADD && $urandom_range(0, 1) == 1) a[62:52] = 11'd1000 + 11'($urandom_range(0, 40));
      #1;
      case (fn)
        F_FADD: begin ey = $realtobits($bitstoreal(a) + $bitstoreal(b)); ef = (a == b); end
        F_ADD:  begin ey = a + b; ef = (a != b); end
        F_UMIN: begin ey = (a < b) ? a : b; ef = (a < b); end
        F_SMIN: begin ey = ($signed(a) < $signed(b)) ? a : b; ef = ($signed(a) < $signed(b)); end
        F_OR:   begin ey = a | b; ef = 0; end
        default: begin ey = a; ef = 0; end
      endcase
      if (fn == F_FADD && ey[62:52] == 11'h7FF && ey[51:0] != 0) ey = 64'h7FF8_0000_0000_0000;
      checks++;
      if (y !== ey || flag !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL fn %s a %h b %h: y %h flag %0d expected %h %0d", fn.name(), a, b, y, flag, ey, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
