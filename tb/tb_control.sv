// tb_control: for every instruction code and every condition-bit setting,
// walks the one-hot step chain and checks the number of steps until
// 'last' (3 for SETAB/ALU/LOAD/STORE/HALT/NOP, 4 for MOV8/MOV16/INC16,
// 6 for LDI16, 8 for branches), the fetch steps, that each bus has at
// most one source, the clear-before-load order of MOV8, and that a branch
// loads PC from J exactly when its condition holds.
module tb_control;
  import relay_pkg::*;
  logic [7:0] state, ir;
  dec_t dec;
  logic s, cy, z, last, taken;
  ctl_t ctl;
  int checks = 0, failures = 0;
  instr_decoder u_dec (.ir(ir), .dec(dec));
  control dut (.state(state), .dec(dec), .s(s), .cy(cy), .z(z), .ctl(ctl), .last(last), .taken(taken));
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int f = 0; f < 8; f++) begin
        int steps, exp_steps;
        logic jumped, exp_jump;
        ir = 8'(i); {s, cy, z} = 3'(f);
        steps = 0; jumped = 0;
        for (int k = 0; k < 8; k++) begin
          state = 8'(1 << k); #1;
          checks++;
          if (!$onehot0({ctl.mem_read, ctl.sel_imm, ctl.sel_alu, ctl.sel8})) begin
            failures++; $display("FAIL two data sources ir=%b step %0d", ir, k);
          end
          if (k == 0) begin
            checks++;
            if (!(ctl.abus == AB_PC && ctl.mem_read && ctl.ld_inst && ctl.ld_inc && !last)) failures++;
          end
          if (k == 1) begin
            checks++;
            if (!(ctl.abus == AB_INC && ctl.ld_pc && !last)) failures++;
          end
          if (dec.cls == I_MOV8 && k == 2) begin
            checks++;
            if (!(ctl.clr8 == 8'(1 << dec.dst8) && ctl.ld8 == 0 && ctl.sel8 == 0)) failures++;
          end
          if (dec.cls == I_MOV8 && k == 3) begin
            checks++;
            if (!(ctl.clr8 == 0 && ctl.ld8 == 8'(1 << dec.dst8) && ctl.sel8 == 8'(1 << dec.src8))) failures++;
          end
          if (k >= 2 && ctl.ld_pc && ctl.abus == AB_J) jumped = 1;
          steps++;
          if (last) break;
        end
        case (dec.cls)
          I_MOV8, I_MOV16, I_INC16: exp_steps = 4;
          I_LDI16:                  exp_steps = 6;
          I_BRANCH:                 exp_steps = 8;
          default:                  exp_steps = 3;
        endcase
        checks++;
        if (steps != exp_steps) begin failures++; $display("FAIL ir=%b steps=%0d exp=%0d", ir, steps, exp_steps); end
        exp_jump = (dec.cls == I_BRANCH) &&
                   ((ir[4] && s) || (ir[3] && cy) || (ir[2] && z) || (ir[1] && !z));
        if (dec.cls == I_MOV16 && !ir[3] && ir[2:1] == 2'b10) exp_jump = 1;  // PC <- J
        checks++;
        if (jumped !== exp_jump) begin failures++; $display("FAIL ir=%b flags=%b jump=%0d", ir, 3'(f), jumped); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
