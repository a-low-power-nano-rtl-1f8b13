// nano_aes_encrypt: the encryption side of the design as one unit, a
// module-level clock gate (clock_gating) in front of the encryption core
// (aes_encrypt). With en low the whole core, control unit included, receives
// no clock edges and keeps its state; with en high it runs as described in
// aes_encrypt. Ports are those of the core plus en.
// This pairing follows the published top-level schematic.
module nano_aes_encrypt (
  input  logic         clk,
  input  logic         en,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         done
);
  logic gclk;

  clock_gating u_cg (.clk, .en, .gclk);

  aes_encrypt u_core (
    .clk (gclk), .rst, .ld, .key, .text_in, .text_out, .done
  );
endmodule
