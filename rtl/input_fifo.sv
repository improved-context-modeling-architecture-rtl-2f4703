// input_fifo: synchronous FIFO at the entry of the input interface.
//
// Incoming coefficients are queued here so that the source never has to wait
// for the code-block memories cycle by cycle. Show-ahead read: rd_data holds
// the oldest entry whenever rd_valid is high and is removed by rd_ready.
// Valid/ready handshakes on both sides; a push and a pop may happen in the
// same cycle. Depth is a power of two. The FIFO itself is named by the
// design; its depth and handshake are this implementation's choices.
module input_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign wr_ready = (wptr - rptr) != (AW+1)'(DEPTH);
  assign rd_valid = wptr != rptr;
  assign rd_data  = mem[rptr[AW-1:0]];
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("input_fifo: DEPTH must be a power of two");
endmodule
