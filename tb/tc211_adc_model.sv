// tc211_adc_model: behavioural model of the TC211 CCD sensor followed by a
// flash A/D converter, testbench only.
//
// The sensor holds ROWS lines of COLS pixels; pixel (r,c) of the exposed
// image has the value pix(r,c), a 6-bit code.  A rising edge of IAG moves
// the next line into the serial register (clearing what was there); a
// falling edge of SRG puts the next pixel of that line on the video output.
// expose marks the end of an integration period: the next IAG edge delivers
// line 0.  The A/D converter samples the video output on the rising edge of
// its conversion clock and presents the upper four bits of the 6-bit code
// on d after its conversion time.
module tc211_adc_model #(
  parameter int ROWS = 165,
  parameter int COLS = 210
) (
  input  logic       iag,
  input  logic       srg,
  input  logic       abg,
  input  logic       expose,
  input  logic       ad_clk,
  output logic [3:0] d
);
  int line = ROWS;   // line in the serial register, ROWS = none
  int col  = 0;
  int n_iag = 0, n_srg = 0, n_abg = 0, n_samples = 0;
  logic [5:0] video = 6'd0;
  int video_line = -1, video_col = -1;   // origin of the video level
  // log of A/D samples: code, and the sensor pixel it came from (-1: none)
  logic [3:0] q_d [$];
  int q_line [$], q_col [$];

  function automatic logic [5:0] pix(int r, int c);
    return 6'((r * 5 + c * 3 + 1) % 64);
  endfunction

  initial d = 4'h0;

  always @(posedge expose) line = -1;

  always @(posedge iag) begin
    n_iag++;
    if (line < ROWS) line++;
    col = 0;
    video = 6'd0;   // serial register cleared
    video_line = -1; video_col = -1;
  end

  always @(negedge srg) begin
    n_srg++;
    if (line >= 0 && line < ROWS && col < COLS) begin
      video = pix(line, col); video_line = line; video_col = col;
    end else begin
      video = 6'd0; video_line = -1; video_col = -1;
    end
    col++;
  end

  always @(posedge abg) n_abg++;

  always @(posedge ad_clk) begin
    logic [5:0] v;
    v = video;
    n_samples++;
    q_d.push_back(v[5:2]); q_line.push_back(video_line); q_col.push_back(video_col);
    #6 d = v[5:2];
  end
endmodule
