// dsp_top: the 16-bit speech-recognition DSP system of Fig. 1.
//
// A micro-programmed DSP in the style of the DSP56001, narrowed to 16-bit data:
// the controller (cu, with the boot ROM inside), the ALU, the address
// generation unit (agu), the X and Y data memories (data_mem, 2048 x 16 each),
// the 1024 x 24 program memory, the host interface to an 8-bit PC bus and the
// bus switch. Buses, following Fig. 1: XD and YD (16 bits) connect X memory,
// Y memory and the ALU; GD (16 bits) connects the controller, the AGU and the
// host interface; the switch joins the three. XA and YA (11 bits) come from
// the AGU; PA (10 bits) and PD (24 bits) link controller, host interface and
// program memory. One instruction can do an ALU operation, an X-memory move
// and a Y-memory move, with two address updates, in one cycle, e.g.
//   MAC X0,Y1,A  X:(R0)+,X0  Y:(R4)-,Y1
// The bidirectional buses of the document are built as multiplexers: each
// bus' local value is the output of the one unit the control word enables.
//
// After reset the boot ROM loader waits for the PC: it writes the program
// length and then the instructions (three bytes each) through the host
// interface, and the DSP starts the loaded program at address 0. The PC side
// is a synchronous register port (pc_addr, pc_wdata, pc_wr, pc_rd, pc_rdata);
// see host_if for the register map. Single clock, active-low asynchronous
// reset.
module dsp_top
  import dsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pc_addr,
  input  logic [7:0]  pc_wdata,
  output logic [7:0]  pc_rdata,
  input  logic        pc_wr,
  input  logic        pc_rd
);
  alu_cnt_t       alu_cnt;
  agu_cnt_t       agu_cnt;
  logic           mx_we, my_we, mx_re, my_re;
  route_e         route;
  gsrc_e          gsrc;
  ccr_t           ccr, ccr_next;
  logic [DW-1:0]  xd, yd, gd, xd_loc, yd_loc, gd_loc;
  logic [DW-1:0]  alu_xd, alu_yd, xm_q, ym_q, cu_gd, agu_gd, hi_din, hi_flags;
  logic [AW-1:0]  xa, ya;
  logic [PAW-1:0] pa, pc;
  logic [IW-1:0]  pd, hi_pd;
  logic           pm_we, norm_inc, norm_dec, boot, stall;
  logic           hi_rd, hi_rd24, hi_wr, hi_st_wr, in_full, out_full;

  cu u_cu (
    .clk, .rst_n, .pa, .pd, .pm_we,
    .alu_cnt, .agu_cnt, .mx_we, .my_we, .mx_re, .my_re, .route, .gsrc,
    .gd_out(cu_gd), .gd_in(gd), .xa, .ccr_next,
    .hi_rd, .hi_rd24, .hi_wr, .hi_st_wr, .hi_in_full(in_full), .hi_out_full(out_full),
    .pc, .boot, .stall
  );

  alu u_alu (
    .clk, .rst_n, .cnt(alu_cnt), .xd_in(xd), .yd_in(yd),
    .xd_out(alu_xd), .yd_out(alu_yd), .ccr, .ccr_next, .norm_inc, .norm_dec
  );

  agu u_agu (
    .clk, .rst_n, .cnt(agu_cnt), .gd_in(gd), .gd_out(agu_gd),
    .norm_inc, .norm_dec, .xa, .ya
  );

  data_mem u_xmem (.clk, .we(mx_we), .addr(xa), .wdata(xd), .rdata(xm_q));
  data_mem u_ymem (.clk, .we(my_we), .addr(ya), .wdata(yd), .rdata(ym_q));

  prog_mem u_pmem (.clk, .we(pm_we), .pa, .wdata(hi_pd), .pd);

  host_if u_hi (
    .clk, .rst_n, .pc_addr, .pc_wdata, .pc_rdata, .pc_wr, .pc_rd,
    .dsp_rd(hi_rd), .dsp_rd24(hi_rd24), .dsp_wr(hi_wr), .dsp_st_wr(hi_st_wr),
    .gd_in(gd), .din(hi_din), .pd_out(hi_pd), .in_full, .out_full, .flags_out(hi_flags)
  );

  // local bus drivers
  always_comb begin
    xd_loc = mx_re ? xm_q : alu_xd;
    yd_loc = my_re ? ym_q : alu_yd;
    case (gsrc)
      GS_IMM, GS_LC: gd_loc = cu_gd;
      GS_AGU:        gd_loc = agu_gd;
      GS_HID:        gd_loc = hi_din;
      GS_HIF:        gd_loc = hi_flags;
      default:       gd_loc = '0;
    endcase
  end

  bus_switch u_sw (.route, .xd_loc, .yd_loc, .gd_loc, .xd, .yd, .gd);

endmodule
