// tb_stabilizer_matrix: drives the stabilizer matrix with directed and random
// Clifford circuits and checks every row after every instruction against a
// reference matrix that is updated by explicit matrix conjugation
// (U * P * U^dagger) and explicit Pauli matrix products.
//
// Directed part: |00> -> H(x)I -> I(x)H gives rows X I / I X; the Bell state
// (H, then CNOT) gives rows XX / ZZ, and replacing row 1 by ZZ * XX gives
// -YY. The matrix must show each result one clock after the instruction.
module tb_stabilizer_matrix;
  import pauli_pkg::*;
  import tb_qref_pkg::*;

  localparam int N = 6;

  logic                clk = 0, rst_n = 0;
  logic                in_valid = 0;
  hz_instr_t           in_instr;
  logic [N-1:0]        init_state = '0;
  logic [HZ_IDX_W-1:0] rd_row = '0;
  logic [N-1:0]        rd_x, rd_z;
  iphase_t             rd_ph;
  logic                commute_o;

  stabilizer_matrix #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lit [N][N];
  int ph  [N];
  bit ref_comm;

  // ---------------------------------------------------------------- reference
  function automatic void ref_init(input logic [N-1:0] s);
    for (int r = 0; r < N; r++) begin
      for (int j = 0; j < N; j++) lit[r][j] = (j == r) ? 1 : 0;
      ph[r] = s[r] ? 2 : 0;
    end
  endfunction

  function automatic void ref_apply(input hz_instr_t ins);
    cm_t m;
    int  p, pb, k, ksum, anti;
    bit  ok;
    int  a = int'(ins.a), b = int'(ins.b);
    case (ins.op)
      HZ_INIT: ref_init(init_state);
      HZ_H, HZ_P:
        for (int r = 0; r < N; r++) begin
          m = conj((ins.op == HZ_H) ? hadamard_m() : phase_m(), pauli_m(lit[r][a]), 2);
          ident1(m, p, k, ok);
          lit[r][a] = p; ph[r] = (ph[r] + k) % 4;
        end
      HZ_CNOT:
        for (int r = 0; r < N; r++) begin
          m = conj(cnot_m(), kron(pauli_m(lit[r][a]), pauli_m(lit[r][b])), 4);
          ident2(m, p, pb, k, ok);
          lit[r][a] = p; lit[r][b] = pb; ph[r] = (ph[r] + k) % 4;
        end
      HZ_ROWMUL: begin
        ksum = ph[a] + ph[b]; anti = 0;
        for (int j = 0; j < N; j++) begin
          lit_mul(lit[b][j], lit[a][j], p, k);
          lit[a][j] = p; ksum += k;
          if (k % 2 == 1) anti++;
        end
        ph[a] = ksum % 4;
        ref_comm = (anti % 2 == 0);
      end
      default: ;
    endcase
  endfunction

  task automatic compare_all(input string what);
    for (int r = 0; r < N; r++) begin
      rd_row = HZ_IDX_W'(r);
      #1;
      checks++;
      for (int j = 0; j < N; j++)
        if (int'({rd_x[j], rd_z[j]}) != lit[r][j]) begin
          failures++;
          $display("FAIL %s: row %0d col %0d got %0d expected %0d", what, r, j,
                   {rd_x[j], rd_z[j]}, lit[r][j]);
          break;
        end
      if (int'(rd_ph) != ph[r]) begin
        failures++;
        $display("FAIL %s: row %0d phase got %0d expected %0d", what, r, rd_ph, ph[r]);
      end
    end
  endtask

  task automatic issue(input hz_op_e op, input int a, input int b);
    @(negedge clk);
    in_instr = '{op: op, a: HZ_IDX_W'(a), b: HZ_IDX_W'(b)};
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    ref_apply(in_instr);
    compare_all(op.name());
  endtask

  function automatic bit row_is(input int r, input string s, input int phase);
    // s: literal letters of row r, qubit 0 first
    for (int j = 0; j < N; j++) begin
      int want;
      byte c = (j < s.len()) ? s[j] : "I";
      want = (c == "X") ? 2 : (c == "Y") ? 3 : (c == "Z") ? 1 : 0;
      if (lit[r][j] != want) return 1'b0;
    end
    return ph[r] == phase;
  endfunction

  initial begin
    int n_anti = 0, n_comm = 0;
    in_instr = '{op: HZ_NOP, a: '0, b: '0};
    ref_init('0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    compare_all("reset");

    // H (x) I then I (x) H on |00...0>
    issue(HZ_H, 0, 0);
    issue(HZ_H, 1, 0);
    checks++;
    if (!row_is(0, "XI", 0) || !row_is(1, "IX", 0)) begin
      failures++; $display("FAIL directed H(x)H");
    end
    // Bell pair, then row 1 := row 1 * row 0 ... see header
    issue(HZ_INIT, 0, 0);
    issue(HZ_H, 0, 0);
    issue(HZ_CNOT, 0, 1);
    checks++;
    if (!row_is(0, "XX", 0) || !row_is(1, "ZZ", 0)) begin
      failures++; $display("FAIL directed Bell rows");
    end
    issue(HZ_ROWMUL, 0, 1);
    checks++;
    if (!row_is(0, "YY", 2) || !row_is(1, "ZZ", 0) || commute_o != 1'b1) begin
      failures++; $display("FAIL directed ZZ*XX = -YY");
    end

    // random circuits
    for (int t = 0; t < 300; t++) begin
      int a, b, c;
      hz_op_e op;
      c = $urandom_range(0, 19);
      a = $urandom_range(0, N-1);
      b = (a + $urandom_range(1, N-1)) % N;
      if (c == 0) begin
        init_state = N'($urandom);
        op = HZ_INIT;
      end else if (c < 7) op = HZ_H;
      else if (c < 12) op = HZ_P;
      else if (c < 17) op = HZ_CNOT;
      else op = HZ_ROWMUL;
      issue(op, a, b);
      if (op == HZ_ROWMUL) begin
        checks++;
        if (commute_o != ref_comm) begin
          failures++; $display("FAIL commute flag");
        end
        if (ref_comm) n_comm++; else n_anti++;
      end
    end
    $display("rowmul: %0d commuting, %0d anticommuting", n_comm, n_anti);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
