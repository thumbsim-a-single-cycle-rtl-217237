// thumb_mem: the machine's word-organised memory, MEMSIZE bytes held as
// MEMSIZE/4 32-bit little-endian words, presented through two ports as in a
// modified Harvard arrangement:
//   - an instruction port that reads the word holding byte address iaddr;
//   - a data port that reads, or on a rising clock edge writes, the word at
//     byte address daddr.
// Addresses are rounded down to a word (bits 1:0 ignored) and wrap modulo the
// memory size; range checking is the caller's job. Both reads are
// combinational so that fetch, load and write-back fit in one cycle.
// The contents are not reset: they are loaded through the data port.
module thumb_mem
  import thumb_pkg::*;
#(
  parameter int unsigned MEMSIZE = 16384
) (
  input  logic  clk,
  input  word_t iaddr,
  output word_t idata,
  input  word_t daddr,
  output word_t drdata,
  input  logic  dwe,
  input  word_t dwdata
);
  localparam int unsigned WORDS = MEMSIZE / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  word_t mem [WORDS];

  assign idata  = mem[iaddr[AW+1:2]];
  assign drdata = mem[daddr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (dwe) mem[daddr[AW+1:2]] <= dwdata;
  end
endmodule
