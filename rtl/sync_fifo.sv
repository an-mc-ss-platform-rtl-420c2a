// Synchronous FIFO, first-word-fall-through, valid/ready on both sides.
// Used for the MAC transmit/receive FIFOs, the packet-formatted TX FIFO and
// the baseband rate-decoupling FIFOs. Depth must be a power of two. `count`
// gives the fill level; `clear` empties it. A word written into an empty
// FIFO is visible at the output on the next cycle.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [W-1:0]             in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [W-1:0]             out_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;

  assign count     = wp - rp;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  // a write into a full FIFO or a read from an empty one never happens
  always_ff @(posedge clk) if (rst_n) assert (count <= (AW+1)'(DEPTH));
endmodule
