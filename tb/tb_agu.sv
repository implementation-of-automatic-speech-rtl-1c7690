// tb_agu: self-checking test of the address generation unit.
//
// Loads R, N and M registers over the global bus and reads them back, then
// runs random addressing operations on both address units at once, in linear
// and modulo arithmetic, and compares the X and Y addresses and the updated
// registers with a reference model. The modulo reference works on the
// buffer offset: base = largest multiple of the buffer's power-of-two size
// below Rn, offset wraps within 0..Mn. Also checks the NORM increment /
// decrement and the indexed (Rn+Nn) and (Rn-Nn) modes leaving Rn unchanged.
`timescale 1ns/1ps
module tb_agu;
  import dsp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  agu_cnt_t    cnt = '0;
  logic [15:0] gd_in = '0, gd_out;
  logic        norm_inc = 1'b0, norm_dec = 1'b0;
  logic [10:0] xa, ya;
  int checks = 0, failures = 0;

  agu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int r [8], n [8], m [8];

  task automatic chk(input string s, input int g, input int e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", s, g, e);
    end
  endtask

  task automatic wr(input int sel, input int v);
    @(negedge clk); cnt = '0; cnt.gd_we = 1'b1; cnt.gd_wsel = 5'(sel); gd_in = 16'(v);
    @(negedge clk); cnt = '0;
    case (sel / 8)
      0: r[sel % 8] = v & 'h7FF;
      1: n[sel % 8] = v & 'h7FF;
      default: m[sel % 8] = v & 'h7FF;
    endcase
  endtask

  function automatic int bufsize(input int mm);
    int s = 1;
    while (s <= mm) s = s * 2;
    return s;
  endfunction

  // reference: new address for r + delta under modifier mm
  function automatic int upd(input int rr, input int delta, input int mm);
    int size, base, off;
    if (mm == 'h7FF) return (rr + delta) & 'h7FF;
    size = bufsize(mm);
    base = rr - (rr % size);
    off  = (rr % size) + delta;
    if (off > mm) off = off - (mm + 1);
    else if (off < 0) off = off + (mm + 1);
    return base + off;
  endfunction

  function automatic int delta(input amode_e md, input int nn);
    case (md)
      AM_POSTINC:  return 1;
      AM_POSTDEC:  return -1;
      AM_POSTINCN: return nn;
      AM_POSTDECN: return -nn;
      default:     return 0;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    @(negedge clk); cnt = '0; cnt.gd_rsel = 5'd16; #1;
    chk("M0 reset linear", gd_out, 'h7FF);
    for (int i = 0; i < 24; i++) wr(i, $urandom);
    for (int i = 0; i < 24; i++) begin
      @(negedge clk); cnt = '0; cnt.gd_rsel = 5'(i); #1;
      chk($sformatf("readback %0d", i), gd_out, (i < 8) ? r[i] : (i < 16) ? n[i - 8] : m[i - 16]);
    end

    for (int it = 0; it < 400; it++) begin
      int xi, yi, ex_xa, ex_ya;
      amode_e xm, ym;
      if (it % 40 == 0) begin
        // new set-up: some registers linear, some modulo with offsets inside the buffer
        for (int i = 0; i < 8; i++) begin
          int mm, sz;
          mm = ($urandom_range(0, 2) == 0) ? 'h7FF : $urandom_range(1, 100);
          wr(16 + i, mm);
          sz = (mm == 'h7FF) ? 2048 : bufsize(mm);
          wr(i, (mm == 'h7FF) ? $urandom_range(0, 'h7FF)
                              : ($urandom_range(0, 2047 / sz - 1) * sz + $urandom_range(0, mm)));
          wr(8 + i, (mm == 'h7FF) ? $urandom_range(0, 'h7FF) : $urandom_range(0, mm + 1));
        end
      end
      xi = $urandom_range(0, 3); yi = $urandom_range(4, 7);
      xm = amode_e'($urandom_range(0, 6)); ym = amode_e'($urandom_range(0, 6));
      @(negedge clk);
      cnt = '0;
      cnt.xen = 1'b1; cnt.xrn = 2'(xi); cnt.xmode = xm;
      cnt.yen = 1'b1; cnt.yrn = 2'(yi - 4); cnt.ymode = ym;
      #1;
      ex_xa = (xm == AM_INDEXN) ? upd(r[xi], n[xi], m[xi]) : (xm == AM_INDEXMN) ? upd(r[xi], -n[xi], m[xi]) : r[xi];
      ex_ya = (ym == AM_INDEXN) ? upd(r[yi], n[yi], m[yi]) : (ym == AM_INDEXMN) ? upd(r[yi], -n[yi], m[yi]) : r[yi];
      chk($sformatf("XA mode %s", xm.name()), xa, ex_xa);
      chk($sformatf("YA mode %s", ym.name()), ya, ex_ya);
      r[xi] = upd(r[xi], delta(xm, n[xi]), m[xi]);
      r[yi] = upd(r[yi], delta(ym, n[yi]), m[yi]);
      @(negedge clk); cnt = '0;
      cnt.gd_rsel = 5'(xi); #1;
      chk($sformatf("R%0d after %s", xi, xm.name()), gd_out, r[xi]);
      cnt.gd_rsel = 5'(yi); #1;
      chk($sformatf("R%0d after %s", yi, ym.name()), gd_out, r[yi]);
    end

    // NORM increments / decrements the named register
    wr(6, 100);
    @(negedge clk); cnt = '0; cnt.norm_en = 1'b1; cnt.norm_rn = 3'd6; norm_dec = 1'b1;
    @(negedge clk); norm_dec = 1'b0; norm_inc = 1'b1;
    @(negedge clk); norm_dec = 1'b1; norm_inc = 1'b0;
    @(negedge clk); norm_dec = 1'b0; cnt = '0; cnt.gd_rsel = 5'd6; #1;
    chk("NORM register", gd_out, 99 - 1 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
