// Address expansion from the logical encrypted memory to DRAM.
//
// Every 256-bit (8-word) logical block is stored as 288 bits (9 words):
// the encrypted data with its authentication value inline as a ninth word.
// Logical word address W (a multiple of 8) therefore maps to DRAM word
// address 9*W/8 = W + W/8, which takes a single adder. Only 8/9 of the DRAM
// holds data. Input: byte address of the block (low 5 bits ignored);
// output: DRAM word address of its first word. Combinational.
module addr_expand (
  input  logic [31:0] log_addr,
  output logic [31:0] phys_word
);
  logic [29:0] w;
  assign w         = {log_addr[31:5], 3'b000};
  assign phys_word = {2'b00, w} + {5'b00000, log_addr[31:5]};
endmodule
