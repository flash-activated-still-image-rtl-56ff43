// vidcap: flash-activated video capture core.
//
// Watches the BT.656 stream from the board's video decoder, measures the
// energy (sum of luminance) of every frame and, once a frame brighter than the
// threshold is seen, writes the following C_NUM_FRAMES frames into memory
// through its OPB master port, all to the same frame buffer at C_FBADDR.
//
// Video clock domain (vid_clk, 27 MHz words):
//   line_field_decoder -> H/V/F, active-video enable, word phase
//   luma_energy        -> per-frame luminance sum, FoundFrame
//   flash_fsm          -> states A..G, CountEnergy, WriteFrame, LEDs
//   pixel_packer       -> 32-bit words {Y, Cr, Y, Cb} with addresses
//   async_fifo write side; a word arriving while the FIFO is full is dropped
//   and counted in dropped_words. XY words failing their protection check are
//   counted in trs_errors.
// Bus clock domain (opb_clk): async_fifo read side -> opb_master_wr.
// inflags (from the GPIO, bus domain) is passed through a two-flip-flop
// synchroniser into the video domain: threshold = {inflags[31:2], 2'b00},
// write_en = inflags[1] & inflags[0]. The bus-domain reset is synchronised the
// same way; that synchroniser powers up asserted. frame_end ("V_falling and
// Fo = 0") is the clock where V drops
// from 1 to 0 while F = 0.
// From the description: the structure (decoder, two counters, the state
// machine, OPB master), inflags bit use, C_FBADDR, C_NUM_FRAMES (at most 15),
// led1/led2. Own choices: the FIFO, synchronisers and everything in the
// sub-blocks marked as such there.
module vidcap
  import fasic_pkg::*;
#(
  parameter logic [31:0] C_FBADDR     = EMC_BASE,
  parameter int unsigned C_NUM_FRAMES = 4,
  parameter int          FIFO_AW      = 4
) (
  input  logic        opb_clk,
  input  logic        opb_rst,
  input  logic        vid_clk,
  input  logic [9:0]  YCrCb_in,
  input  logic [31:0] inflags,
  output opb_m2b_t    m2b,
  input  opb_b2m_t    b2m,
  output logic        led1,
  output logic        led2,
  // status
  output cap_state_t  state,
  output logic [31:0] energy,
  output logic        pal_ntsc,
  output logic [31:0] dropped_words,
  output logic [15:0] trs_errors,
  output logic [31:0] words_written,
  output logic [31:0] words_failed
);

  // ---------------- clock domain crossing of reset and inflags ----------------
  // The video-domain reset starts asserted at power-up (FPGA register init),
  // so the video logic never runs from random state before opb_rst arrives.
  logic [1:0]  vrst_sync = 2'b11;
  logic        vid_rst;
  logic [31:0] flags_s1, flags_s2;

  always_ff @(posedge vid_clk) begin
    vrst_sync <= {vrst_sync[0], opb_rst};
    flags_s1  <= inflags;
    flags_s2  <= flags_s1;
  end
  assign vid_rst = vrst_sync[1];

  logic        write_en;
  logic [31:0] threshold;
  assign write_en  = flags_s2[1] & flags_s2[0];
  assign threshold = {flags_s2[31:2], 2'b00};

  // ---------------- video timing ----------------
  logic [9:0]  vid;
  logic        h, v, f, de, trs_err;
  logic [11:0] wcnt;
  logic [10:0] pcnt;
  logic [9:0]  lcnt;
  logic        hsync_n, vsync_n, blank_n;

  line_field_decoder u_lfd (
    .clk(vid_clk), .rst(vid_rst), .vid_in(YCrCb_in), .vid_out(vid),
    .h_out(h), .v_out(v), .f_out(f), .de_out(de), .wcnt_out(wcnt), .pcnt_out(pcnt),
    .lcnt_out(lcnt), .pal_ntsc_out(pal_ntsc), .hsync_out(hsync_n),
    .vsync_out(vsync_n), .blank_out(blank_n), .trs_err(trs_err)
  );

  logic v_q, frame_end;
  always_ff @(posedge vid_clk) begin
    if (vid_rst) v_q <= 1'b1;
    else         v_q <= v;
  end
  assign frame_end = v_q && !v && !f;      // V_falling and Fo = 0

  // ---------------- energy counter and state machine ----------------
  logic found, count_energy, write_frame;
  logic [3:0] frame_count;

  luma_energy #(.YW(8), .EW(32)) u_energy (
    .clk(vid_clk), .rst(vid_rst), .clear(frame_end),
    .sample_en(count_energy && de && wcnt[0]), .y(vid[9:2]),
    .threshold(threshold), .energy(energy), .found(found)
  );

  flash_fsm #(.C_NUM_FRAMES(C_NUM_FRAMES)) u_fsm (
    .clk(vid_clk), .rst(vid_rst), .write_en(write_en), .found_frame(found),
    .frame_end(frame_end), .state(state), .count_energy(count_energy),
    .write_frame(write_frame), .frame_count(frame_count), .led1(led1), .led2(led2)
  );

  // ---------------- packing and buffering ----------------
  logic        pk_valid;
  logic [31:0] pk_addr, pk_data;

  pixel_packer #(.C_FBADDR(C_FBADDR), .W(10)) u_pack (
    .clk(vid_clk), .rst(vid_rst), .frame_start(frame_end), .write_frame(write_frame),
    .de(de), .phase(wcnt[1:0]), .vid(vid),
    .out_valid(pk_valid), .out_addr(pk_addr), .out_data(pk_data)
  );

  logic        q_full, q_empty, q_pop;
  logic [63:0] q_data;

  async_fifo #(.DW(64), .AW(FIFO_AW)) u_fifo (
    .wclk(vid_clk), .wrst(vid_rst), .wen(pk_valid), .wdata({pk_addr, pk_data}), .full(q_full),
    .rclk(opb_clk), .rrst(opb_rst), .ren(q_pop), .rdata(q_data), .empty(q_empty)
  );

  always_ff @(posedge vid_clk) begin
    if (vid_rst)      trs_errors <= '0;
    else if (trs_err) trs_errors <= trs_errors + 16'd1;
  end

  always_ff @(posedge vid_clk) begin
    if (vid_rst)                dropped_words <= '0;
    else if (pk_valid && q_full) dropped_words <= dropped_words + 32'd1;
  end

  // ---------------- OPB master ----------------
  opb_master_wr u_master (
    .clk(opb_clk), .rst(opb_rst), .q_empty(q_empty), .q_data(q_data), .q_pop(q_pop),
    .m2b(m2b), .b2m(b2m), .words_written(words_written), .words_failed(words_failed)
  );

endmodule
