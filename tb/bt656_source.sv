// bt656_source: behavioural model of the video decoder's output, a BT.656
// 4:2:2 word stream (Cb, Y, Cr, Y, ... at one word per clock, 10 bits).
//
// Each line starts with EAV (3FF 000 000 XY, H=1), then horizontal blanking
// (200h / 040h pairs), then SAV (3FF 000 000 XY, H=0) and 2*ACT active words.
// Blanking is 138 samples for NTSC (525 lines) and 144 for PAL (625 lines), so
// a full-size line is 1716 or 1728 words. F and V per line follow the
// standard's line tables (NTSC: field 1 active lines 20-263, field 2 active
// 283-525; PAL: 23-310 and 336-623). The XY word carries correct protection
// bits unless corrupt_sav asks for one damaged SAV word.
// Picture content (8-bit values, stored in bits [9:2]):
//   Cb = 16 + line mod 200, Cr = 16 + (sample/2) mod 200,
//   first Y of a pair = y_level, second Y = y_level + 1.
// y_level is sampled one clock into every line (after frame_no has stepped). frame_no counts frames,
// stepping when the first active line of field 1 starts (line 20 / 23).
// The t_* outputs give the ground truth for the word on data.
module bt656_source #(
  parameter int ACT = 720
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pal,          // takes effect at line 1
  input  logic [7:0] y_level,
  input  logic       corrupt_sav,  // damage the next SAV XY word
  output logic [9:0] data,
  output logic       t_h,
  output logic       t_v,
  output logic       t_f,
  output logic [9:0] t_line,
  output logic       t_active,
  output logic [11:0] t_word,      // index within active line (valid when t_active)
  output int         frame_no,
  output logic       t_pal
);

  int line, w, lw, blank_w;
  logic [7:0] yl;
  logic corrupt_pend;

  function automatic void fv(input int ln, input logic p, output logic f, output logic v);
    if (!p) begin
      f = (ln <= 3) || (ln >= 266);
      v = (ln <= 19) || (ln >= 264 && ln <= 282);
    end else begin
      f = (ln >= 313);
      v = (ln <= 22) || (ln >= 311 && ln <= 335) || (ln >= 624);
    end
  endfunction

  function automatic logic [9:0] xy(input logic f, input logic v, input logic h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h, 2'b00};
  endfunction

  always_comb begin
    blank_w = t_pal ? 288 : 276;
    lw      = 2 * ACT + blank_w;
  end

  always @(posedge clk) begin
    if (rst) begin
      line <= 1; w <= 0; frame_no <= 0; t_pal <= pal; yl <= y_level; corrupt_pend <= 1'b0;
    end else begin
      if (corrupt_sav) corrupt_pend <= 1'b1;
      if (w == blank_w - 1 && corrupt_pend) corrupt_pend <= 1'b0;
      if (w == lw - 1) begin
        w  <= 0;
        if (line == (t_pal ? 625 : 525)) begin
          line  <= 1;
          t_pal <= pal;
        end else begin
          line <= line + 1;
        end
        if (line + 1 == (t_pal ? 23 : 20)) frame_no <= frame_no + 1;
      end else begin
        w <= w + 1;
        if (w == 0) yl <= y_level;
      end
    end
  end

  always_comb begin
    logic f, v;
    int a;
    fv(line, t_pal, f, v);
    t_f = f; t_v = v; t_line = 10'(line);
    t_h = (w < blank_w);
    t_active = !t_h && !v;
    a = w - blank_w;
    t_word = t_h ? 12'd0 : 12'(a);
    if (w == 0 || w == blank_w - 4)            data = 10'h3FF;
    else if (w == 1 || w == 2 || w == blank_w - 3 || w == blank_w - 2) data = 10'h000;
    else if (w == 3)                           data = xy(f, v, 1'b1);
    else if (w == blank_w - 1)                 data = xy(f, v, 1'b0) ^ (corrupt_pend ? 10'h004 : 10'h000);
    else if (t_h)                              data = w[0] ? 10'h040 : 10'h200;
    else begin
      unique case (a % 4)
        0: data = {8'(16 + (line % 200)), 2'b00};
        1: data = {yl, 2'b00};
        2: data = {8'(16 + ((a / 4) % 200)), 2'b00};
        default: data = {yl + 8'd1, 2'b00};
      endcase
    end
  end

endmodule
