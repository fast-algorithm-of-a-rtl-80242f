// sd_adder_tree: adds N signed-digit decimal operands with a balanced binary
// tree of carry-free sd_adder stages, ceil(log2 N) levels deep. Level k holds
// ceil(N / 2^k) partial sums; each node of level k+1 adds two neighbours of
// level k, and an odd one out is passed down unchanged. All sums are modulo
// 10^W. Operand k is ops[k]; digit i of it is ops[k][i] (5-bit two's
// complement, -9..9). Combinational.
// The tree shape is this design's own choice; what is prescribed is only that
// the partial products are reduced by a tree of redundant adders.
module sd_adder_tree #(
  parameter int unsigned N = 33,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0][4:0] ops,
  output logic [W-1:0][4:0]        sum
);
  localparam int unsigned LEV = (N <= 1) ? 0 : $clog2(N);

  // Number of partial sums at level k
  function automatic int unsigned count(input int unsigned k);
    return (N + (1 << k) - 1) >> k;
  endfunction

  logic [N-1:0][W-1:0][4:0] lv [LEV+1];

  assign lv[0] = ops;

  for (genvar k = 0; k < int'(LEV); k++) begin : g_lev
    localparam int unsigned CIN = count(k);
    for (genvar m = 0; m < int'(N); m++) begin : g_node
      if (2 * m + 1 < int'(CIN)) begin : g_add
        sd_adder #(.W(W)) u_add (
          .x(lv[k][2*m]),
          .y(lv[k][2*m+1]),
          .s(lv[k+1][m])
        );
      end else if (2 * m < int'(CIN)) begin : g_pass
        assign lv[k+1][m] = lv[k][2*m];
      end else begin : g_none
        assign lv[k+1][m] = '0;
      end
    end
  end

  assign sum = lv[LEV][0];
endmodule
