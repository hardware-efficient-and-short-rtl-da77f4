// tb_wssr_sort: random key sets (with repeated keys) through the 16-input
// sorting network; checks that outputs are in decreasing order, that each
// output equals the input its index names, and that the indices form a
// permutation.
module tb_wssr_sort;
  localparam int N = 16;
  logic [15:0] key_in [N], key_out [N];
  logic [3:0]  idx_out [N];
  int checks = 0, failures = 0;

  wssr_sort #(.N(N), .KW(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      bit [N-1:0] seen;
      seen = '0;
      for (int i = 0; i < N; i++)
        key_in[i] = (n % 3 == 0) ? 16'($urandom_range(0, 5)) : 16'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (i > 0 && key_out[i] > key_out[i-1]) begin failures++; $display("order at %0d", i); end
        if (key_out[i] != key_in[idx_out[i]]) begin failures++; $display("index at %0d", i); end
        seen[idx_out[i]] = 1'b1;
      end
      checks++;
      if (seen != '1) begin failures++; $display("not a permutation"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
