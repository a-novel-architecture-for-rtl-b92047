// Constituent code of the repeat-accumulate LDPC encoder: a modulo-2
// accumulator, i.e. an XOR gate with a one-bit register in its feedback loop.
//
// Every data bit routed to this constituent code is XOR-ed into the register;
// after the last bit the register holds the parity bit p. The systematic
// output s repeats the incoming bit (the encoder discards it and sends one
// copy of the data frame instead). clear loads the register with chain_in, so
// a parity bit of one constituent code can start the next one, or with 0 when
// chain_in is tied low. The accumulator structure and the chaining follow the
// encoder drawing; the clear/valid handshake is this design's own.
//
// Timing: one data bit per clock when d_valid is high; p is registered and
// reflects all bits accepted up to the previous clock edge.
module ldpc_accumulator (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,     // start a new parity bit, load chain_in
  input  logic chain_in,  // parity bit of the previous constituent code
  input  logic d_valid,
  input  logic d,
  output logic s,         // systematic copy of the input bit
  output logic p          // accumulated parity
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       p <= 1'b0;
    else if (clear)   p <= chain_in;
    else if (d_valid) p <= p ^ d;
  end

  assign s = d;
endmodule
