// dpram: dual-port RAM holding the working array of the square-root
// algorithm (one complex 16Q8 entry, 32 bits, per word).
//
// Two independent ports, A and B, each able to read or write one word per
// cycle; together they move 64 bits per cycle, so one row of a column pair
// can be fetched for the two CORDICs, or written back from them, in a single
// cycle. Reads are synchronous: rdata is valid the cycle after en with
// we = 0 and holds until the next read on that port. Writing the same
// address from both ports in one cycle is not allowed (an assertion checks
// it). There is no reset; the control unit initialises every word it reads.
// The port organisation and the read latency are this implementation's
// choices; the design only names a dual-port RAM beside the two CORDICs.
module dpram
  import pinv_pkg::*;
#(
  parameter int unsigned DEPTH = (1 + M_TX + N_RX) * (M_TX + 1),
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [ABITS-1:0] a_addr,
  input  cplx_t            a_wdata,
  output cplx_t            a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [ABITS-1:0] b_addr,
  input  cplx_t            b_wdata,
  output cplx_t            b_rdata
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

  a_no_write_clash: assert property (@(posedge clk)
      !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("dpram: both ports write address %0d", a_addr);

endmodule
