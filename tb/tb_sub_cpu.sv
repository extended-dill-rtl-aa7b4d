// Testbench of the sub-CPU.
//
// A 16 x 4 data memory model answers the memory bus combinationally and is
// written at the rising edge when mw = 1.  The testbench first runs the
// memory load Load R0,R1 on the cleared registers, then the
// ten-instruction program of the design description (immediate loads, an add
// with carry, two compares, a store and a load from memory), then random
// instructions.  A reference model computes, independently of the RTL, the
// register and flag values after each instruction and the bus and mw values
// during it.  Every instruction must complete in exactly one clock cycle: the
// new state is checked right after the rising edge that ends the cycle.
//
// The two programs at the start are the document's own examples and the
// expected register values after them are the document's; the memory model,
// the random instructions and the reference model are this testbench's own.
`timescale 1ns/1ps
`include "rtl/check.svh"
module tb_sub_cpu;
  import dill_pkg::*;
  int checks = 0, failures = 0;
  int n_op[4];
  int n_imm = 0, n_carry = 0, n_eq = 0, n_neq = 0;

  logic clk = 0, clr_n = 1;
  logic [8:0] ir = '0;
  logic [3:0] dt_in;
  logic [3:0][3:0] r;
  logic flag1, flag0, mw;
  logic [3:0] bus_a, bus_b;
  logic [3:0] mem [16];

  sub_cpu dut (.clk, .clr_n, .ir, .dt_in, .r, .flag1, .flag0,
               .bus_a_or_marr(bus_a), .bus_b_or_dtout(bus_b), .mw);

  always #5 clk = ~clk;
  assign dt_in = mem[bus_a];
  always @(posedge clk) if (mw) mem[bus_a] <= bus_b;

  // reference state
  logic [3:0] m_r [4];
  logic m_f1, m_f0;

  function automatic logic [8:0] enc(bit imm, logic [1:0] op, int dr, int sa, int sb);
    return {imm, op, 2'(dr), 2'(sa), 2'(sb)};
  endfunction

  task automatic run(logic [8:0] instr);
    logic [1:0] op;
    logic [3:0] a, b, nv;
    logic [4:0] s;
    int dr;
    op = instr[7:6];
    dr = int'(instr[5:4]);
    a  = m_r[instr[3:2]];
    b  = m_r[instr[1:0]];
    @(negedge clk);
    ir = instr;
    #1;
    `CHECK(bus_a, a, "BusAorMArr = R[SA]")
    `CHECK(bus_b, b, "BusBorDtOut = R[SB]")
    `CHECK(mw, (op == 2'b01), "MW")
    nv = 'x;
    case (op)
      2'b00: begin m_f0 = (a == b); if (m_f0) n_eq++; else n_neq++; end
      2'b01: ;
      2'b10: begin
        if (instr[8]) begin nv = instr[3:0]; n_imm++; end
        else nv = mem[a];
        m_r[dr] = nv;
      end
      2'b11: begin
        s = {1'b0, a} + {1'b0, b};
        m_r[dr] = s[3:0]; m_f1 = s[4];
        if (s[4]) n_carry++;
      end
    endcase
    n_op[op]++;
    @(posedge clk);
    #1;
    for (int i = 0; i < 4; i++) `CHECK(r[i], m_r[i], $sformatf("R%0d after one cycle", i))
    `CHECK(flag1, m_f1, "Flag1")
    `CHECK(flag0, m_f0, "Flag0")
    if (op == 2'b01) `CHECK(mem[a], b, "memory written by Store")
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end

  initial begin
    logic [8:0] x;
    for (int i = 0; i < 16; i++) mem[i] = 4'(i * 7 + 3);
    for (int i = 0; i < 4; i++) m_r[i] = '0;
    m_f1 = 0; m_f0 = 0;
    #1 clr_n = 0;
    repeat (2) @(posedge clk);
    #1 clr_n = 1;
    for (int i = 0; i < 4; i++) `CHECK(r[i], 4'h0, "cleared register")
    // the first instruction tried in the description: Load R0,R1 from
    // memory; after the clear R1 = 0, so it reads M[0]
    run(enc(0, 2'b10, 0, 1, 0));
    `CHECK(r[0], 4'h3, "Load R0,R1 read M[0] after clear")
    // the ten-instruction program of the description
    run(enc(1, 2'b10, 0, 0, 0));        // Load R0,0000
    run(enc(1, 2'b10, 1, 0, 3));        // Load R1,0011
    run(9'b1_10_10_1110);               // Load R2,1110
    run(enc(1, 2'b10, 3, 0, 3));        // Load R3,0011
    run(enc(0, 2'b11, 0, 1, 2));        // Add  R0,R1,R2
    `CHECK(r[0], 4'b0001, "Add R0,R1,R2 sum (0011+1110)")
    `CHECK(flag1, 1'b1, "Add R0,R1,R2 carry")
    run(enc(0, 2'b00, 0, 0, 2));        // Cmp  R0,R2
    `CHECK(flag0, 1'b0, "Cmp R0,R2 unequal")
    run(enc(0, 2'b00, 0, 1, 3));        // Cmp  R1,R3
    `CHECK(flag0, 1'b1, "Cmp R1,R3 equal")
    run(enc(1, 2'b10, 3, 0, 0));        // Load R3,0000
    run(enc(0, 2'b01, 0, 3, 1));        // Store R3,R1
    `CHECK(mem[0], 4'b0011, "Store R3,R1 wrote M[0]")
    run(enc(0, 2'b10, 2, 3, 0));        // Load R2,R3
    `CHECK(r[2], 4'b0011, "Load R2,R3 read M[0]")
    // random instructions
    for (int k = 0; k < 400; k++) begin
      x = 9'($urandom);
      if (x[7:6] == 2'b00 && ($urandom % 3 == 0)) x[1:0] = x[3:2];  // equal compares too
      run(x);
    end
    for (int i = 0; i < 4; i++) `CHECK(n_op[i] > 0, 1'b1, "every opcode executed")
    `CHECK(n_imm > 0, 1'b1, "immediate load seen")
    `CHECK(n_carry > 0, 1'b1, "carry out seen")
    `CHECK(n_eq > 0 && n_neq > 0, 1'b1, "both compare outcomes seen")
    `TB_DONE
  end
endmodule
