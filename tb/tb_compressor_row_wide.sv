// tb_compressor_row_wide: random test of a 16-column compressor row, the
// width of one reduction stage in a 16-bit multiplier's tree.
//
// 200000 random vectors, with operand columns biased towards dense patterns
// so that full columns and carries on every link occur often. Each vector is
// checked against the same arithmetic reference model as the three-column
// test (per column: k = floor(ones/2), cout1 = k mod 2, cout2 = k div 2,
// sum/carry from parity + cin1 + cin2) and by comparing weighted totals.
// Counts, each required at least once: a carry passed through every cin1
// link and every cin2 link of the row, all three row carry-outs high, and a
// flip of the external carries with every cout bit held.
module tb_compressor_row_wide;
  import comp72_pkg::*;

  localparam int C = 16;
  localparam int NVEC = 200000;

  int checks = 0, failures = 0;

  col_in_t  [C-1:0] a;
  logic             cin1_in;
  logic     [1:0]   cin2_in;
  c72_out_t [C-1:0] col_out;

  compressor_row #(.COLUMNS(C)) dut (
    .a(a), .cin1_in(cin1_in), .cin2_in(cin2_in), .col_out(col_out)
  );

  int unsigned link_cin1 [C];
  int unsigned link_cin2 [C];
  int unsigned all_outs_high = 0, held_couts = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4*C-1:0] ref_row(col_in_t [C-1:0] av, logic c1, logic [1:0] c2);
    c72_out_t [C-1:0] r;
    for (int i = 0; i < C; i++) begin
      int n, k, t;
      logic ci1, ci2;
      n   = $countones(av[i]);
      k   = n / 2;
      r[i].cout1 = 1'(k % 2);
      r[i].cout2 = 1'(k / 2);
      ci1 = (i == 0) ? c1 : r[i-1].cout1;
      ci2 = (i < 2) ? c2[i] : r[i-2].cout2;
      t   = (n % 2) + int'(ci1) + int'(ci2);
      r[i].sum   = 1'(t % 2);
      r[i].carry = 1'(t / 2);
    end
    return r;
  endfunction

  function automatic bit couts_equal(c72_out_t [C-1:0] p, c72_out_t [C-1:0] q);
    for (int i = 0; i < C; i++)
      if (p[i].cout1 !== q[i].cout1 || p[i].cout2 !== q[i].cout2) return 1'b0;
    return 1'b1;
  endfunction

  // Column with a random density: OR-ing or AND-ing random words skews the
  // number of ones up or down.
  function automatic col_in_t rand_col();
    case ($urandom_range(3))
      0: return col_in_t'($urandom);
      1: return col_in_t'($urandom | $urandom);
      2: return col_in_t'($urandom | $urandom | $urandom);
      default: return col_in_t'($urandom & $urandom);
    endcase
  endfunction

  task automatic check_now();
    c72_out_t [C-1:0] exp;
    logic [C+2:0] in_total, out_total;   // wide enough for the row's range
    exp = ref_row(a, cin1_in, cin2_in);
    checks++;
    if (col_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got=%h exp=%h", col_out, exp);
    end
    in_total  = (C+3)'(cin1_in) + (C+3)'(cin2_in[0]) + ((C+3)'(cin2_in[1]) << 1);
    out_total = '0;
    for (int i = 0; i < C; i++) begin
      in_total  += (C+3)'($countones(a[i])) << i;
      out_total += ((C+3)'(col_out[i].sum) + ((C+3)'(col_out[i].carry) << 1)) << i;
    end
    out_total += ((C+3)'(col_out[C-1].cout1) + (C+3)'(col_out[C-2].cout2)) << C;
    out_total += (C+3)'(col_out[C-1].cout2) << (C + 1);
    checks++;
    if (in_total != out_total) begin
      failures++;
      if (failures < 10) $display("FAIL totals in=%0d out=%0d", in_total, out_total);
    end
  endtask

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      c72_out_t [C-1:0] held;
      for (int i = 0; i < C; i++) a[i] = rand_col();
      {cin2_in, cin1_in} = 3'($urandom);
      #1;
      check_now();
      for (int i = 0; i < C; i++) begin
        if (i < C - 1 && col_out[i].cout1) link_cin1[i]++;
        if (i < C - 2 && col_out[i].cout2) link_cin2[i]++;
      end
      if (col_out[C-1].cout1 && col_out[C-1].cout2 && col_out[C-2].cout2) all_outs_high++;
      held = col_out;
      {cin2_in, cin1_in} = ~{cin2_in, cin1_in};
      #1;
      check_now();
      checks++;
      if (!couts_equal(col_out, held)) begin
        failures++;
        if (failures < 10) $display("FAIL cout moved with carry inputs");
      end else begin
        held_couts++;
      end
    end
    for (int i = 0; i < C - 1; i++) if (link_cin1[i] == 0) begin
      failures++;
      $display("cin1 link %0d never carried", i);
    end
    for (int i = 0; i < C - 2; i++) if (link_cin2[i] == 0) begin
      failures++;
      $display("cin2 link %0d never carried", i);
    end
    $display("all row carry-outs high %0d, carry-input flips with couts held %0d",
             all_outs_high, held_couts);
    if (all_outs_high == 0 || held_couts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
