// tb_evd_model: behavioural model of the eigenvalue-decomposition unit the
// sensor connects to (not synthesizable; for simulation only).
//
// On a start pulse it copies the N x N real symmetric matrix, diagonalises
// it with cyclic Jacobi rotations in double precision, and after LAT clock
// cycles pulses done with
//   lambda[j] : eigenvalue j scaled so that the largest is 60000 (unsigned,
//               at least 1),
//   vec[j][e] : element e of the unit-norm eigenvector j, Q1.15.
// Eigenvalues come out in no particular order. The 900-cycle default is
// the decomposition time assumed for the sensor.
module tb_evd_model #(
  parameter int N   = 16,
  parameter int LAT = 900
) (
  input  logic               clk,
  input  logic               start,
  input  logic signed [31:0] mat    [N][N],
  output logic               done,
  output logic [15:0]        lambda [N],
  output logic signed [15:0] vec    [N][N]
);
  real a [N][N];
  real v [N][N];

  initial begin
    done = 0;
    for (int j = 0; j < N; j++) begin
      lambda[j] = 0;
      for (int e = 0; e < N; e++) vec[j][e] = 0;
    end
  end

  task automatic jacobi();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = real'(mat[i][j]);
        v[i][j] = (i == j) ? 1.0 : 0.0;
      end
    for (int sweep = 0; sweep < 50; sweep++) begin
      real off, tot;
      off = 0; tot = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          tot += a[i][j] * a[i][j];
          if (i != j) off += a[i][j] * a[i][j];
        end
      if (off <= 1e-24 * tot) break;
      for (int p = 0; p < N - 1; p++)
        for (int q = p + 1; q < N; q++) begin
          real th, t, c, s;
          if (a[p][q] == 0.0) continue;
          th = (a[q][q] - a[p][p]) / (2.0 * a[p][q]);
          t  = 1.0 / ((th < 0 ? -th : th) + $sqrt(th * th + 1.0));
          if (th < 0) t = -t;
          c = 1.0 / $sqrt(t * t + 1.0);
          s = t * c;
          for (int k = 0; k < N; k++) begin
            real akp, akq;
            akp = a[k][p]; akq = a[k][q];
            a[k][p] = c * akp - s * akq;
            a[k][q] = s * akp + c * akq;
          end
          for (int k = 0; k < N; k++) begin
            real apk, aqk;
            apk = a[p][k]; aqk = a[q][k];
            a[p][k] = c * apk - s * aqk;
            a[q][k] = s * apk + c * aqk;
          end
          for (int k = 0; k < N; k++) begin
            real vkp, vkq;
            vkp = v[k][p]; vkq = v[k][q];
            v[k][p] = c * vkp - s * vkq;
            v[k][q] = s * vkp + c * vkq;
          end
        end
    end
  endtask

  always @(posedge clk) begin
    if (start) begin
      real mx;
      jacobi();
      mx = 0;
      for (int j = 0; j < N; j++) if (a[j][j] > mx) mx = a[j][j];
      if (mx <= 0) mx = 1;
      repeat (LAT - 1) @(posedge clk);
      for (int j = 0; j < N; j++) begin
        real sc;
        sc = a[j][j] * 60000.0 / mx;
        lambda[j] <= (sc < 1.0) ? 16'd1 : 16'($rtoi(sc + 0.5));
        for (int e = 0; e < N; e++) vec[j][e] <= 16'($rtoi(v[e][j] * 32767.0));
      end
      done <= 1'b1;
      @(posedge clk);
      done <= 1'b0;
    end
  end
endmodule
