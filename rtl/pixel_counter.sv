// Pixel position tracker for a video stream.
//
// Gives the column and row of the beat currently offered, derived only from
// the stream flags: a beat with "user" set is column 0 of row 0, the beat after
// one with "last" set starts a new row. The counters move when a beat is
// accepted (acc). Positions are combinational from the offered beat so that a
// core can use them in the cycle it accepts the pixel.
module pixel_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         acc,
  input  logic         user,
  input  logic         last,
  output logic [W-1:0] col,
  output logic [W-1:0] row
);

  logic [W-1:0] col_q, row_q;

  assign col = user ? '0 : col_q;
  assign row = user ? '0 : row_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_q <= '0;
      row_q <= '0;
    end else if (acc) begin
      if (last) begin
        col_q <= '0;
        row_q <= row + 1'b1;
      end else begin
        col_q <= col + 1'b1;
        row_q <= row;
      end
    end
  end

endmodule
