// wssr_sort: sorting network for the MDL block's merge-sort (MS) stage.
//
// Sorts N unsigned keys in decreasing order and returns, for every sorted
// position, the index of the input it came from (needed to pick the matching
// eigenvectors). It is Batcher's odd-even merge sort, a merge sort laid out
// as a fixed network of compare-exchange elements; N must be a power of two.
// Purely combinational; the MDL block registers the result. Equal keys keep
// no particular order.
module wssr_sort #(
  parameter int unsigned N  = 16,
  parameter int unsigned KW = 16
) (
  input  logic [KW-1:0]        key_in  [N],
  output logic [KW-1:0]        key_out [N],
  output logic [$clog2(N)-1:0] idx_out [N]
);
  localparam int unsigned IW = $clog2(N);

  always_comb begin
    automatic logic [KW-1:0] k [N];
    automatic logic [IW-1:0] x [N];
    for (int i = 0; i < int'(N); i++) begin
      k[i] = key_in[i];
      x[i] = IW'(i);
    end
    for (int p = 1; p < int'(N); p = p * 2)
      for (int q = p; q >= 1; q = q / 2)
        for (int j = q % p; j < int'(N) - q; j = j + 2 * q)
          for (int i = 0; i < q; i++)
            if ((i + j + q < int'(N)) && ((i + j) / (2 * p) == (i + j + q) / (2 * p)))
              if (k[i+j] < k[i+j+q]) begin
                {k[i+j], k[i+j+q]} = {k[i+j+q], k[i+j]};
                {x[i+j], x[i+j+q]} = {x[i+j+q], x[i+j]};
              end
    key_out = k;
    idx_out = x;
  end
endmodule
