// rev_prom: reversible programmable read-only memory.
//
// The AND array is fixed: a reversible N-to-2^N decoder (rev_decoder) turns
// the address into one minterm line per word. The OR array is programmable:
// rev_or_plane puts a reversible fuse on every minterm line for every output
// bit, so or_en[o][w] is bit o of the word stored at address w. With e = 1,
// data = the word at address addr; with e = 0 all minterms are 0 and data = 0.
//
// Interface: addr (N_ADDR bits), e (enable, active high), or_en (the stored
// contents, one row per data bit), data (N_OUT bits). Purely combinational.
// The fixed-decoder / programmable-OR organisation and the reversible
// decoder are the original design's; N_ADDR = 4 uses its 4-to-16 decoder.
// The word width N_OUT = 3 (the output count of the PAL/PLA example) is this
// RTL's choice.
module rev_prom #(
  parameter int unsigned N_ADDR = 4,
  parameter int unsigned N_OUT  = 3
) (
  input  logic [N_ADDR-1:0]                  addr,
  input  logic                               e,
  input  logic [N_OUT-1:0][2**N_ADDR-1:0]    or_en,
  output logic [N_OUT-1:0]                   data
);
  logic [2**N_ADDR-1:0] minterm;

  rev_decoder #(.N(N_ADDR)) u_dec (.in(addr), .e(e), .out(minterm), .garbage());
  rev_or_plane #(.N_TERM(2**N_ADDR), .N_OUT(N_OUT)) u_or_plane (
    .prod(minterm), .en(or_en), .f(data));
endmodule
