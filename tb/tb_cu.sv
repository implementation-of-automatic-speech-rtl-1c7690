// tb_cu: self-checking test of the controller unit.
//
// The testbench models what surrounds the controller: the program memory (an
// array on PA / PD), the host interface word and its in_full / out_full
// flags, R0 on the X address bus and N1 on the global bus. The controller
// boots from its ROM: it takes the program length and then the program from
// the modelled host, writing each word to program memory at R0 (checked).
// The loaded program marks each instruction with MOVE #tag,X0, so the order
// of execution can be read off the control outputs. It covers nested DO
// loops, a one-instruction loop, a loop of count 1, a taken and an untaken
// conditional jump and a host-write stall. The test compares the sequence of
// executed tags with the expected one and checks the cycle count: one cycle
// per instruction, no cost for jumps and loops, plus the stall cycles.
`timescale 1ns/1ps
module tb_cu;
  import dsp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [9:0]  pa;
  logic [23:0] pd;
  logic        pm_we;
  alu_cnt_t    alu_cnt;
  agu_cnt_t    agu_cnt;
  logic        mx_we, my_we, mx_re, my_re;
  route_e      route;
  gsrc_e       gsrc;
  logic [15:0] gd_out, gd_in;
  logic [10:0] xa = '0;
  ccr_t        ccr_next;
  logic        hi_rd, hi_rd24, hi_wr, hi_st_wr;
  logic        hi_in_full = 1'b0, hi_out_full = 1'b0;
  logic [9:0]  pc;
  logic        boot, stall;
  int checks = 0, failures = 0;

  cu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int g, input int e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", s, g, e);
    end
  endtask

  // ------------------------------------------------------------ environment
  localparam int L = 17;
  logic [23:0] pmem [1024];
  logic [23:0] prog [L];
  logic [23:0] hiq [$];
  logic [23:0] hi_word;

  function automatic logic [23:0] tag(input int a);
    return i_movi(G_X0, 16'(16'h100 + a));
  endfunction

  initial begin
    for (int i = 0; i < L; i++) prog[i] = tag(i);
    prog[1]  = i_doi(8'd3, 10'd5);
    prog[3]  = i_doi(8'd2, 10'd4);
    prog[6]  = i_jmp(CC_EQ, 1'b0, 10'd9);
    prog[10] = i_jmp(CC_NE, 1'b0, 10'd7);
    prog[11] = i_doi(8'd1, 10'd12);
    prog[13] = i_movr(G_X0, G_HID);
    prog[14] = i_doi(8'd5, 10'd15);
    prog[16] = i_jmp(CC_AL, 1'b0, 10'd16);
    for (int i = 0; i < 1024; i++) pmem[i] = I_NOP;
  end

  assign pd       = pmem[pa];
  assign ccr_next = '{n: 1'b0, z: 1'b1, v: 1'b0, c: 1'b0, e: 1'b0};
  assign hi_word  = (hiq.size() > 0) ? hiq[0] : 24'h0;
  always_comb begin
    case (gsrc)
      GS_HID:  gd_in = hi_word[15:0];
      GS_AGU:  gd_in = 16'(L);         // N1 holds the program length
      default: gd_in = gd_out;
    endcase
  end

  // host: a new word becomes valid some cycles after the previous one is taken
  int hold = 0;
  always @(posedge clk) begin
    if (pm_we) begin
      chk("program address is R0", pa, xa);
      pmem[pa] <= hi_word;
      xa <= xa + 1'b1;
    end
    if ((hi_rd || hi_rd24) && hi_in_full) begin
      void'(hiq.pop_front());
      hi_in_full <= 1'b0;
      hold = $urandom_range(0, 3);
    end else if (!hi_in_full && hiq.size() > 0) begin
      if (hold == 0) hi_in_full <= 1'b1;
      else hold--;
    end
  end

  // ------------------------------------------------------------ observation
  int seq [$];
  longint cyc = 0;
  longint t_first = -1, t_last = -1;
  int n_stall = 0, out_stall = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!boot && stall) n_stall++;
    if (!boot && gsrc == GS_IMM && alu_cnt.xd_we && !stall) begin
      seq.push_back(int'(gd_out) - 'h100);
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
    end
    // the program's host write: hold out_full for 5 cycles
    if (!boot && hi_wr == 1'b0 && route == RT_XD2GD && stall) out_stall++;
  end

  initial begin
    int exp_seq [$];
    hiq.push_back(24'(L));
    for (int i = 0; i < L; i++) hiq.push_back(prog[i]);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk("starts in boot ROM", boot, 1);
    wait (!boot);
    for (int i = 0; i < L; i++) chk($sformatf("loaded word %0d", i), pmem[i], prog[i]);
    chk("R0 after load", xa, L);
    // output word full when the program reaches address 13
    hi_out_full = 1'b1;
    repeat (60) @(negedge clk);
    hi_out_full = 1'b0;
    repeat (40) @(negedge clk);
    exp_seq = '{0, 2, 4, 4, 5, 2, 4, 4, 5, 2, 4, 4, 5, 9, 12, 15, 15, 15, 15, 15};
    chk("number of tags", seq.size(), exp_seq.size());
    for (int i = 0; i < exp_seq.size() && i < seq.size(); i++)
      chk($sformatf("tag %0d", i), seq[i], exp_seq[i]);
    // executed: 0 1 (2 3 4 4 5)x3 6 9 10 11 12 13 14 15x5 = 29 instructions,
    // plus the cycles instruction 13 waited for the host
    chk("cycles from first to last tag", int'(t_last - t_first), 28 + out_stall);
    chk("host write stalled", out_stall > 0, 1);
    chk("stall cycles all from host write", n_stall, out_stall);
    chk("program ends in its self-loop", pc, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
