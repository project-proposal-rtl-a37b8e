// zbt_ram_model: behavioural model of one pipelined ZBT SRAM chip for
// simulation (not synthesizable logic of the design; the chip is external).
// Address and write enable are sampled at a clock edge; two edges later the
// write data are sampled (write) or the read data appear on rdata (read).
// Every cycle may be a read or a write, with no turnaround cycles.
module zbt_ram_model
  import ar_pkg::*;
#(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  hsv_t          wdata,
  output hsv_t          rdata
);
  hsv_t          mem [2**AW];
  logic [AW-1:0] a1, a2;
  logic          w1, w2;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    a1 <= addr; w1 <= we;
    a2 <= a1;   w2 <= w1;
    if (w2) mem[a2] <= wdata;
    rdata <= mem[a2];
  end
endmodule
