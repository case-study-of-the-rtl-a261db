// asc_control_rom: the control ROM of the MBU/AU pipe, 512 words of 256 bits.
//
// Every word carries the enabling signals of all sections for one clock plus
// the two next-address fields B1 and B2 that the sequencer feeds back to the
// ROM address (B1 normally, B2 when the MBU sees the end of a vector loop).
// The 512 x 256 size is the document's; the contents are this design's
// microprogram, computed by asc_au_pkg::rom_word() when the ROM is built
// (no data file).  Only the low CTL_W bits are defined; the remaining output
// lines read 0 (in the original part they served the IPU and MBU).
//
// Interface: combinational read, data = ROM[addr]; ctl is the same word
// decoded into the control-word structure.
module asc_control_rom
  import asc_au_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  parameter int unsigned WIDTH = ROM_WIDTH
) (
  input  rom_addr_t        addr,
  output logic [WIDTH-1:0] data,
  output ctl_t             ctl
);
  logic [WIDTH-1:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = WIDTH'(rom_word(rom_addr_t'(i)));
  end

  assign data = rom[addr];
  assign ctl  = ctl_t'(data[CTL_W-1:0]);
endmodule
