// wallace_tree: carry-save reduction tree for N summands of W bits.
//
// Each level groups its rows in threes and replaces every group by a sum row
// and a carry row from a carry-save adder (csa); the one or two rows left over
// pass to the next level unchanged. Levels are added until two rows remain, so
// N rows need about log_{1.5}(N/2) levels of full-adder delay instead of N-1
// carry-propagate additions. The two outputs are summed by a single
// carry-propagate adder outside the tree: sum + carry == sum of rows modulo
// 2^W. Combinational.
module wallace_tree #(
  parameter int N = 28,
  parameter int W = 106
) (
  input  logic [N-1:0][W-1:0] rows,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);

  function automatic int next_rows(int n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  function automatic int rows_at(int level);
    int n;
    n = N;
    for (int l = 0; l < level; l++) n = next_rows(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n, l;
    n = N;
    l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  // g_level[l].r holds the rows of level l; level 0 is the input
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int NIN = rows_at(l);
    logic [NIN-1:0][W-1:0] r;
    if (l == 0) begin : g_src
      assign r = rows;
    end else begin : g_reduce
      localparam int NPREV = rows_at(l - 1);
      localparam int NG    = NPREV / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        csa #(.W(W)) u_csa (
          .a  (g_level[l-1].r[3*g]),
          .b  (g_level[l-1].r[3*g+1]),
          .c  (g_level[l-1].r[3*g+2]),
          .s  (r[2*g]),
          .co (r[2*g+1])
        );
      end
      for (genvar k = 0; k < NPREV % 3; k++) begin : g_pass
        assign r[2*NG+k] = g_level[l-1].r[3*NG+k];
      end
    end
  end

  assign sum = g_level[LEVELS].r[0];
  if (N > 1) begin : g_two
    assign carry = g_level[LEVELS].r[1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
