// Behavioural model of a matched delay element (sd_i, hd_i).
//
// In silicon or on an FPGA a delay element is a chain of buffer cells sized
// so that a control transition arrives after the data it is bundled with is
// stable (sd: setup side) or stays stable long enough (hd: hold side). It has
// no logic function, so this model is not synthesizable: it forwards every
// transition of din to dout after DELAY_PS picoseconds. Like a chain of
// gates it is inertial: a pulse shorter than the delay is swallowed. The
// controllers of the interface never toggle a wire twice within one delay.
//
// Interface: din in, dout out, both single control wires. dout follows din
// DELAY_PS after time zero; the controllers that drive these elements are
// held in reset for longer than that.
// The delay values are set by the instantiating block from its cycle-time
// constraints.
`timescale 1ns / 1ps
module delay_element #(
  parameter int unsigned DELAY_PS = 1000
) (
  input  logic din,
  output logic dout
);

  assign #(DELAY_PS * 1ps) dout = din;

endmodule
