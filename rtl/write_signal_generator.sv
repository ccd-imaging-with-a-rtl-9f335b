// write_signal_generator: VRAM write strobe for image acquisition.
//
// The GSP only performs memory-to-shift-register transfers during screen
// refresh.  A VRAM turns such a cycle into a shift-register-to-memory
// transfer if its write input is low when RAS falls.  This block makes that
// low pulse itself: WRITE' is the NAND of CAS', inverted TR'/QE' and LCLK2,
// so it is low for the half local clock in which TR'/QE' is low with CAS'
// still high, i.e. at the start of a transfer cycle.  A 2-to-1 multiplexer
// then gives the VRAMs WRITE' while DUDATE is set and the GSP's own W'
// otherwise.  Combinational; the gate function and the multiplexer follow
// the document.
module write_signal_generator (
  input  logic cas_n,
  input  logic trqe_n,
  input  logic lclk2,
  input  logic w_n,      // GSP write strobe
  input  logic dudate,
  output logic write_n,  // WRITE' of the generator
  output logic bw_n      // write strobe to the VRAM bank
);

  assign write_n = ~(cas_n & ~trqe_n & lclk2);
  assign bw_n    = dudate ? write_n : w_n;

endmodule
