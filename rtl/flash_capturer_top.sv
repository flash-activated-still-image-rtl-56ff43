// flash_capturer_top: the flash-activated still image capturer system, plus
// the stand-alone Y'CrCb-to-R'G'B' converter.
//
// Capturer: one OPB bus (opb_bus) joins two masters -- the host processor
// port host_m2b/host_b2m (the processor and its debug module are outside this
// RTL) and the capture core vidcap -- with two slaves: the GPIO register at
// 0x80000300 and the ZBT memory controller at 0x80100000-0x801FFFFF. The GPIO
// output drives vidcap's inflags. The host writes {threshold, 2'b11} to the
// GPIO to arm the detector, waits for led2, reads the frame back from memory
// and writes 0 to the GPIO to reset. The ZBT SRAM itself is off-chip; its pins
// are ports. opb_clk is the bus and memory clock, vid_clk the 27 MHz decoder
// clock; rst is synchronous to opb_clk.
// Converter: csc_mult on its own clock, ports csc_*; it is not connected to
// the capturer (the captured frame is converted off-line).
module flash_capturer_top
  import fasic_pkg::*;
#(
  parameter logic [31:0] C_FBADDR     = EMC_BASE,
  parameter int unsigned C_NUM_FRAMES = 4,
  parameter int          FIFO_AW      = 4,
  parameter int          CSC_W        = 10
) (
  input  logic        opb_clk,
  input  logic        rst,
  input  logic        vid_clk,
  input  logic [9:0]  YCrCb_in,
  // host (processor / debug module) master port
  input  opb_m2b_t    host_m2b,
  output opb_b2m_t    host_b2m,
  // ZBT SRAM bank
  output logic [17:0] zbt_addr,
  output logic        zbt_cs_n,
  output logic        zbt_we_n,
  output logic [3:0]  zbt_bw_n,
  output logic [31:0] zbt_dq_o,
  output logic        zbt_dq_oe,
  input  logic [31:0] zbt_dq_i,
  // user LEDs
  output logic        led1,
  output logic        led2,
  // status
  output cap_state_t  cap_state,
  output logic [31:0] energy,
  output logic        pal_ntsc,
  output logic [31:0] dropped_words,
  output logic [15:0] trs_errors,
  output logic [31:0] words_written,
  output logic [31:0] words_failed,
  // colour space converter
  input  logic             csc_clk,
  input  logic             csc_ce,
  input  logic [CSC_W-1:0] csc_y,
  input  logic [CSC_W-1:0] csc_cr,
  input  logic [CSC_W-1:0] csc_cb,
  output logic [CSC_W-1:0] csc_r,
  output logic [CSC_W-1:0] csc_g,
  output logic [CSC_W-1:0] csc_b
);

  opb_m2b_t    m2b [2];
  opb_b2m_t    b2m [2];
  opb_b2s_t    b2s;
  opb_s2b_t    s2b [2];
  logic [31:0] gpio_d_out;

  assign m2b[0]   = host_m2b;
  assign host_b2m = b2m[0];

  opb_bus #(.NM(2), .NS(2)) u_opb (
    .clk(opb_clk), .rst(rst), .m2b(m2b), .b2m(b2m), .b2s(b2s), .s2b(s2b)
  );

  vidcap #(.C_FBADDR(C_FBADDR), .C_NUM_FRAMES(C_NUM_FRAMES), .FIFO_AW(FIFO_AW)) u_vidcap (
    .opb_clk(opb_clk), .opb_rst(rst), .vid_clk(vid_clk), .YCrCb_in(YCrCb_in),
    .inflags(gpio_d_out), .m2b(m2b[1]), .b2m(b2m[1]), .led1(led1), .led2(led2),
    .state(cap_state), .energy(energy), .pal_ntsc(pal_ntsc),
    .dropped_words(dropped_words), .trs_errors(trs_errors), .words_written(words_written), .words_failed(words_failed)
  );

  opb_gpio #(.C_BASEADDR(GPIO_BASE), .C_GPIO_WIDTH(32)) u_gpio (
    .clk(opb_clk), .rst(rst), .b2s(b2s), .s2b(s2b[0]), .gpio_d_out(gpio_d_out)
  );

  opb_emc #(.C_BASEADDR(EMC_BASE), .C_HIGHADDR(EMC_HIGH), .ZAW(18)) u_emc (
    .clk(opb_clk), .rst(rst), .b2s(b2s), .s2b(s2b[1]),
    .zbt_addr(zbt_addr), .zbt_cs_n(zbt_cs_n), .zbt_we_n(zbt_we_n), .zbt_bw_n(zbt_bw_n),
    .zbt_dq_o(zbt_dq_o), .zbt_dq_oe(zbt_dq_oe), .zbt_dq_i(zbt_dq_i)
  );

  csc_mult #(.W(CSC_W), .CF(9)) u_csc (
    .clk(csc_clk), .ce(csc_ce), .y(csc_y), .cr(csc_cr), .cb(csc_cb),
    .r(csc_r), .g(csc_g), .b(csc_b)
  );

endmodule
