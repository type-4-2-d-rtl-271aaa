// sym2d_line_delay: the z1^-1 element of a row-scanned 2-D filter. With the
// image fed one sample per enable in row-scan order, a vertical delay of one
// row is a delay of D = M samples (M = padded image width).
//
// Built as a circular buffer of D words with one pointer that is read and
// written at the same address: q_o is the word that was written D enables
// ago. A fill flag forces q_o to zero until the buffer has been written once
// after reset, so the memory itself needs no reset (zero initial conditions
// of the filter). Timing: q_o is a combinational read of the buffer;
// d_i is taken on a rising clk edge when en is high.
module sym2d_line_delay #(
  parameter int unsigned W = 56,
  parameter int unsigned D = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);
  localparam int unsigned PW = (D > 1) ? $clog2(D) : 1;

  logic [W-1:0]  mem [D];
  logic [PW-1:0] ptr;
  logic          filled;

  initial assert (D >= 1) else $error("line delay needs D >= 1");

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= d_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else if (en) begin
      if (ptr == PW'(D - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  assign q_o = filled ? mem[ptr] : '0;
endmodule
