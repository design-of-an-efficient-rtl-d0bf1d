// align_skew: removes the one-cycle-per-row skew of a column stream.
//
// Row j of the input arrives j cycles after row 0 of the same column; it is delayed by
// N-1-j registers so that all N bytes of a column appear together, N-1 cycles after row 0
// arrived. For N = 4 this is 3+2+1 = 6 byte registers, the mirror image of the R0..R5
// network. Used on the outputs of the MixColumns array and of its bypass. This alignment
// is this design's addition; no reset is needed as only aligned, valid slots are used.
module align_skew
  import aes_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic  clk,
  input  byte_t din  [N],
  output word_t dout
);

  for (genvar j = 0; j < N; j++) begin : g_row
    localparam int unsigned D = N - 1 - j;
    if (D == 0) begin : g_direct
      assign dout[8*(N-1-j) +: 8] = din[j];
    end else begin : g_delay
      byte_t sr [D];
      always_ff @(posedge clk) begin
        sr[0] <= din[j];
        for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
      end
      assign dout[8*(N-1-j) +: 8] = sr[D-1];
    end
  end

endmodule
