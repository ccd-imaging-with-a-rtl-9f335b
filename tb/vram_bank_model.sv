// vram_bank_model: behavioural model of one 16-bit VRAM bank (four 64K x 4
// video RAMs with 256-word serial registers), testbench only.
//
// Only the serial side is modelled.  On each rising edge of the shift clock
// sc the word at the serial pointer is read out on sout and the word on sin
// is written there, then the pointer advances.  A transfer cycle is a
// falling edge of RAS with TR'/QE' low: if W' is low at that edge the
// serial register is written to memory row `row` (register-to-memory),
// otherwise the row is loaded into the register (memory-to-register); the
// serial pointer restarts at 0 either way.
// One real bank holds 256 rows of 256 words; ROWS defaults to 512 so that
// the two banks of the frame buffer, seen as one array of rows, hold a full
// 512-line display.
module vram_bank_model #(
  parameter int ROWS = 512,
  parameter int COLS = 256
) (
  input  logic        ras_n,
  input  logic        trqe_n,
  input  logic        w_n,
  input  logic [8:0]  row,
  input  logic        sc,
  input  logic [15:0] sin,
  output logic [15:0] sout
);
  logic [15:0] mem [ROWS][COLS];
  logic [15:0] sr  [COLS];
  int ptr = 0;
  int n_write_xfer = 0, n_read_xfer = 0;

  initial begin
    foreach (mem[r, c]) mem[r][c] = 16'h0;
    foreach (sr[c]) sr[c] = 16'h0;
    sout = 16'h0;
  end

  always @(posedge sc) begin
    sout    <= sr[ptr];
    sr[ptr] <= sin;
    ptr     <= (ptr + 1) % COLS;
  end

  always @(negedge ras_n) begin
    if (!trqe_n) begin
      if (!w_n) begin
        foreach (sr[c]) mem[row][c] = sr[c];
        n_write_xfer++;
      end else begin
        foreach (sr[c]) sr[c] = mem[row][c];
        n_read_xfer++;
      end
      ptr = 0;
    end
  end
endmodule
