// tb_alu: every function code with every (B, C) pair. Expected results are
// worked out in the testbench with integer arithmetic: add = (B+C) mod 256
// with carry = (B+C) >= 256, inc = (B+1) mod 256 with carry when B = 255,
// and/or/xor/not bitwise, shl = (2B mod 256) + (B div 128), nop = 0;
// S = result >= 128, Z = result == 0, carry 0 for all but add and inc.
module tb_alu;
  import relay_pkg::*;
  logic [7:0] b, c, result;
  alu_fn_e fn;
  logic s, cy, z;
  int checks = 0, failures = 0;
  alu dut (.*);
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int f = 0; f < 8; f++) begin
      for (int i = 0; i < 65536; i++) begin
        int bi, ci, r, ecy;
        fn = alu_fn_e'(f);
        {b, c} = 16'(i);
        #1;
        bi = int'(b); ci = int'(c); ecy = 0;
        case (f)
          0: begin r = (bi + ci) % 256; ecy = (bi + ci) >= 256; end
          1: begin r = (bi + 1) % 256;  ecy = (bi == 255); end
          2: r = int'(b & c);
          3: r = int'(b | c);
          4: r = int'(b ^ c);
          5: r = 255 - bi;
          6: r = ((2 * bi) % 256) + (bi / 128);
          default: r = 0;
        endcase
        checks++;
        if (result !== 8'(r) || s !== (r >= 128) || z !== (r == 0) || cy !== 1'(ecy)) begin
          failures++;
          if (failures < 10)
            $display("FAIL fn=%0d b=%h c=%h got %h s%0d cy%0d z%0d exp %h cy%0d", f, b, c, result, s, cy, z, 8'(r), ecy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
