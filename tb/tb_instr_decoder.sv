// tb_instr_decoder: all 256 instruction codes. The expected class and
// fields are derived here from the instruction formats by bit arithmetic
// (upper bits compared as integers), and every instruction of the
// published example program is checked for its meaning by name.
module tb_instr_decoder;
  import relay_pkg::*;
  logic [7:0] ir;
  dec_t dec;
  int checks = 0, failures = 0;
  instr_decoder dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_named(input logic [7:0] code, input iclass_e cls, input int dst, input int src);
    ir = code; #1;
    checks++;
    if (dec.cls !== cls || (dst >= 0 && int'(dec.dst8) != dst) || (src >= 0 && int'(dec.src8) != src)) begin
      failures++; $display("FAIL named %b: cls=%0d dst=%0d src=%0d", code, dec.cls, dec.dst8, dec.src8);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      iclass_e e;
      int top2, top4;
      ir = 8'(i); #1;
      top2 = i / 64; top4 = i / 16;
      if (top2 == 0)                         e = I_MOV8;
      else if (top2 == 1)                    e = I_SETAB;
      else if (top4 == 8)                    e = I_ALU;
      else if (i / 4 == 36)                  e = I_LOAD;   // 100100rr
      else if (i / 4 == 38)                  e = I_STORE;  // 100110rr
      else if (i == 174)                     e = I_HALT;   // 10101110
      else if (top4 == 10 && i % 2 == 0 && (i / 2) % 4 != 3) e = I_MOV16;
      else if (i == 176)                     e = I_INC16;
      else if (i == 192)                     e = I_LDI16;
      else if (i >= 224)                     e = I_BRANCH;
      else                                   e = I_NOP;
      checks++;
      if (dec.cls !== e) begin failures++; $display("FAIL %b cls=%0d exp=%0d", ir, dec.cls, e); end
      if (e == I_SETAB) begin
        int v;
        v = (i % 32 >= 16) ? (i % 32) - 32 : i % 32;
        checks++;
        if (dec.imm8 !== 8'(v) || dec.dst8 !== ((i / 32) % 2 ? R_B : R_A)) failures++;
      end
      if (e == I_ALU) begin
        checks++;
        if (int'(dec.fn) != i % 8 || dec.dst8 !== ((i / 8) % 2 ? R_D : R_A)) failures++;
      end
      if (e == I_LOAD) begin
        checks++; if (int'(dec.dst8) != i % 4) failures++;
      end
      if (e == I_STORE) begin
        checks++; if (int'(dec.src8) != i % 4) failures++;
      end
      if (e == I_MOV8) begin
        checks++; if (int'(dec.dst8) != (i / 8) % 8 || int'(dec.src8) != i % 8) failures++;
      end
    end
    // example program, instruction by instruction
    expect_named(8'b00111001, I_MOV8, R_Y, R_B);    // Y=B
    expect_named(8'b00110110, I_MOV8, R_X, R_X);    // X=0 (self move)
    expect_named(8'b10000101, I_ALU, R_A, -1);      // A=~B
    expect_named(8'b00110010, I_MOV8, R_X, R_C);    // X=C
    expect_named(8'b01011001, I_SETAB, R_A, -1);    // A=-7
    checks++; if (dec.imm8 !== 8'hF9) failures++;
    expect_named(8'b00011000, I_MOV8, R_D, R_A);    // D=A
    expect_named(8'b00001110, I_MOV8, R_B, R_X);    // B=X
    expect_named(8'b10000110, I_ALU, R_A, -1);      // A=B<<1
    checks++; if (dec.fn !== FN_SHL) failures++;
    expect_named(8'b10001001, I_ALU, R_D, -1);      // D=B+1
    checks++; if (dec.fn !== FN_INC) failures++;
    expect_named(8'b10101110, I_HALT, -1, -1);
    // branch group
    ir = 8'b11110000; #1; checks++; if (!(dec.br_s && !dec.br_cy && !dec.br_z && !dec.br_nz && !dec.br_link)) failures++;
    ir = 8'b11101000; #1; checks++; if (!(!dec.br_s && dec.br_cy && !dec.br_z && !dec.br_nz)) failures++;
    ir = 8'b11100100; #1; checks++; if (!(dec.br_z && !dec.br_nz)) failures++;
    ir = 8'b11100010; #1; checks++; if (!(!dec.br_z && dec.br_nz)) failures++;
    ir = 8'b11100110; #1; checks++; if (!(dec.br_z && dec.br_nz && !dec.br_link)) failures++;
    ir = 8'b11100111; #1; checks++; if (!(dec.br_z && dec.br_nz && dec.br_link)) failures++;
    // MOV16 fields
    ir = 8'b10101010; #1; checks++; if (!(dec.cls == I_MOV16 && dec.d16_xy && dec.s16 == 2'b01)) failures++;
    ir = 8'b10100100; #1; checks++; if (!(dec.cls == I_MOV16 && !dec.d16_xy && dec.s16 == 2'b10)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
