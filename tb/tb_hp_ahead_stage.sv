// Test bench of hp_ahead_stage (default sizes, and a second instance with
// weight boosting). Random loads, holds (no branch) and recoveries; the
// latched values are modelled as integers and the output is checked
// against psum + selected bias weight + selected newest-global weight
// (bias doubled with boosting), the index against row and select bit.
module tb_hp_ahead_stage;
  localparam int NT = 16, NP = 1, W = 8, L = 11, SW = 13;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, sel, advance, recover;
  logic signed [SW-1:0] ld_psum, rec_psum, out, out_b;
  logic [2*W-1:0] ld_pair_bias, ld_pair_recent;
  logic [NT*(L-1)-1:0] ld_rows;
  logic [NT-1:0] ld_lsbs;
  logic [W-1:0] rec_w_bias, rec_w_recent;
  logic [NT*L-1:0] idx, idx_b;

  hp_ahead_stage dut (.*);
  hp_ahead_stage #(.BOOST(1'b1)) dut_boost (
    .clk, .rst, .sel, .advance, .ld_psum, .ld_pair_bias, .ld_pair_recent, .ld_rows, .ld_lsbs,
    .recover, .rec_psum, .rec_w_bias, .rec_w_recent, .out(out_b), .idx(idx_b));

  int m_psum, m_b [2], m_r [2];
  logic [NT*(L-1)-1:0] m_rows;
  logic [NT-1:0] m_lsbs;
  int checks = 0, failures = 0, n_hold = 0, n_rec = 0, n_adv = 0;

  function automatic int sx(logic [W-1:0] v);
    return int'(signed'(v));
  endfunction

  task automatic compare();
    int e, eb;
    bit ok;
    e  = m_psum + m_b[sel] + m_r[sel];
    eb = m_psum + 2 * m_b[sel] + m_r[sel];
    ok = (int'(out) == e) && (int'(out_b) == eb) && (idx == idx_b);
    for (int t = 0; t < NT; t++)
      if (idx[t*L +: L] != {m_rows[t*(L-1) +: (L-1)], (t == 0 || t == NP + 1) ? sel : m_lsbs[t]}) ok = 0;
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL out=%0d exp=%0d", out, e); end
  endtask

  initial begin
    rst = 1; sel = 0; advance = 0; recover = 0; ld_psum = '0; rec_psum = '0;
    ld_pair_bias = '0; ld_pair_recent = '0; ld_rows = '0; ld_lsbs = '0;
    rec_w_bias = '0; rec_w_recent = '0;
    m_psum = 0; m_b = '{0, 0}; m_r = '{0, 0}; m_rows = '0; m_lsbs = '0;
    @(posedge clk); #1 rst = 0;
    compare();
    for (int it = 0; it < 5000; it++) begin
      int a;
      a = int'($urandom_range(0, 9));
      advance = (a < 6) || (a == 9);
      recover = (a >= 8);
      ld_psum = SW'(int'($urandom_range(0, 3000)) - 1500);
      rec_psum = SW'(int'($urandom_range(0, 3000)) - 1500);
      ld_pair_bias = 16'($urandom); ld_pair_recent = 16'($urandom);
      rec_w_bias = 8'($urandom); rec_w_recent = 8'($urandom);
      for (int t = 0; t < NT; t++) ld_rows[t*(L-1) +: (L-1)] = (L-1)'($urandom);
      ld_lsbs = NT'($urandom);
      @(posedge clk); #1;
      if (recover) begin
        n_rec++;
        m_psum = int'(rec_psum);
        m_b = '{sx(rec_w_bias), sx(rec_w_bias)};
        m_r = '{sx(rec_w_recent), sx(rec_w_recent)};
        m_rows = ld_rows; m_lsbs = ld_lsbs;
      end else if (advance) begin
        n_adv++;
        m_psum = int'(ld_psum);
        m_b = '{sx(ld_pair_bias[W-1:0]), sx(ld_pair_bias[2*W-1:W])};
        m_r = '{sx(ld_pair_recent[W-1:0]), sx(ld_pair_recent[2*W-1:W])};
        m_rows = ld_rows; m_lsbs = ld_lsbs;
      end else n_hold++;
      advance = 0; recover = 0;
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        #1 compare();
      end
    end
    checks++;
    if (n_hold == 0 || n_rec == 0 || n_adv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
