// subkey_mem: the processor's subkey memory, 52 registers of 16 bits
// (six subkeys for each of the eight rounds, then four for the output
// transformation, in that order: address 6*(r-1)+(i-1) holds K_i of round
// r, addresses 48..51 hold the output-round subkeys). It is built from
// flip-flops rather than a RAM because every round of an unrolled processor
// reads its six subkeys at the same time; all 52 words are therefore
// available in parallel on `keys`.
// Interface: one write port (we, addr, wdata), written on the rising clock
// edge; writes to addresses above 51 are ignored. Encryption and decryption
// differ only in the subkeys loaded here; the key schedule that computes
// them is outside this design. No reset: the subkeys must be loaded before
// the first block is processed.
module subkey_mem
  import idea_pkg::*;
(
  input  logic                       clk,
  input  logic                       we,
  input  logic [5:0]                 addr,
  input  word_t                      wdata,
  output word_t [NSUBKEYS-1:0]       keys
);
  always_ff @(posedge clk) begin
    if (we && (int'(addr) < NSUBKEYS)) keys[addr] <= wdata;
  end
endmodule
