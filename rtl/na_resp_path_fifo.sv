// Response path FIFO (target adapter): while the slave core works on a read,
// this FIFO holds where its response must go (arrival port, BE return path,
// MThreadID, burst length). Entries are pushed by Request Decap when a read
// is issued and popped by Response Encap when the last response word has been
// packed. Synchronous, first-word-fall-through, DEPTH entries (a power of
// two); push when full and pop when empty are ignored.
// Storing the return path here follows the adapter's description; the depth
// is this design's choice.
module na_resp_path_fifo
  import mango_na_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  resp_path_t wdata,
  output logic       full,
  input  logic       pop,
  output resp_path_t rdata,
  output logic       empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  resp_path_t     mem [DEPTH];
  logic [PW-1:0]  wp, rp;
  logic [PW:0]    cnt;
  logic           do_push, do_pop;

  assign full    = (cnt == (PW+1)'(DEPTH));
  assign empty   = (cnt == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end
endmodule
