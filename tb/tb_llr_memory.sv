// tb_llr_memory: checks the LLR memory (N = 64, P = 4, Q = 5: internal banks
// of 8 words per lo/hi RAM, channel region at address 8, two channel pages of
// 8 words per lo/hi RAM) against a model. PE writes go to the lo or hi RAM of
// all three internal banks at one address; channel writes go to the chosen
// page only, and both may happen in the same cycle. Every read returns the six
// words at the common read address: internal addresses read the three banks,
// channel addresses read page rd_page on the F outputs and word 0 on the G
// outputs. The test also requires reads of one channel page in cycles where
// the other page is being written (frame overlap) and simultaneous PE and
// channel writes.
module tb_llr_memory;
  import polar_pkg::*;
  localparam int N = 64, P = 4, Q = 5, W = P * Q;
  localparam int FD = f_depth(6, P), GD = g_depth(6, P), AW = $clog2(FD);
  localparam int CHW = stage_words(6, P), CAW = $clog2(CHW), BASE = stage_base(6, P);
  logic clk = 0;
  logic [AW-1:0] raddr = '0, pe_addr = '0;
  logic [CAW-1:0] ch_addr = '0;
  logic [W-1:0] f_lo, f_hi, gp_lo, gp_hi, gm_lo, gm_hi;
  logic pe_we = 0, pe_hi = 0, ch_we = 0, ch_hi = 0, ch_page = 0, rd_page = 0;
  logic [W-1:0] pe_f = '0, pe_gp = '0, pe_gm = '0, ch_word = '0;
  logic [W-1:0] m_f [2][GD];
  logic [W-1:0] m_gp [2][GD];
  logic [W-1:0] m_gm [2][GD];
  logic [W-1:0] m_ch [2][2][CHW];
  int checks = 0, failures = 0, n_both = 0, n_overlap = 0;

  always #50 clk = ~clk;

  llr_memory #(.N(N), .P(P), .Q(Q)) dut (.*);

  function automatic logic [W-1:0] rword();
    return W'({$urandom, $urandom});
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    // fill the internal banks and both channel pages
    @(negedge clk);
    for (int h = 0; h < 2; h++)
      for (int a = 0; a < GD; a++) begin
        pe_we = 1; pe_hi = h[0]; pe_addr = AW'(a);
        pe_f = rword(); pe_gp = rword(); pe_gm = rword();
        m_f[h][a] = pe_f; m_gp[h][a] = pe_gp; m_gm[h][a] = pe_gm;
        @(negedge clk);
      end
    pe_we = 0;
    for (int pg = 0; pg < 2; pg++)
      for (int h = 0; h < 2; h++)
        for (int a = 0; a < CHW; a++) begin
          ch_we = 1; ch_page = pg[0]; ch_hi = h[0]; ch_addr = CAW'(a); ch_word = rword();
          m_ch[pg][h][a] = ch_word;
          @(negedge clk);
        end
    ch_we = 0;
    check(BASE == GD && FD == GD + CHW, "memory map sizes");
    for (int t = 0; t < 3000; t++) begin
      int ra, pa, ca;
      bit rp;
      ra = int'($urandom % FD);
      rp = 1'($urandom);
      raddr = AW'(ra);
      rd_page = rp;
      #1;
      if (ra < BASE)
        check(f_lo == m_f[0][ra] && f_hi == m_f[1][ra] &&
              gp_lo == m_gp[0][ra] && gp_hi == m_gp[1][ra] &&
              gm_lo == m_gm[0][ra] && gm_hi == m_gm[1][ra], $sformatf("internal read %0d", ra));
      else
        check(f_lo == m_ch[rp][0][ra - BASE] && f_hi == m_ch[rp][1][ra - BASE] &&
              gp_lo == m_gp[0][0] && gp_hi == m_gp[1][0] &&
              gm_lo == m_gm[0][0] && gm_hi == m_gm[1][0], $sformatf("channel read %0d page %0d", ra, rp));
      pa = int'($urandom % GD);
      ca = int'($urandom % CHW);
      pe_we = 1'($urandom); pe_hi = 1'($urandom); pe_addr = AW'(pa);
      pe_f = rword(); pe_gp = rword(); pe_gm = rword();
      ch_we = ($urandom % 3) == 0; ch_hi = 1'($urandom); ch_addr = CAW'(ca); ch_word = rword();
      ch_page = (t % 8 == 0) ? rp : !rp;
      if (pe_we && ch_we) n_both++;
      if (ch_we && ra >= BASE && ch_page != rp) n_overlap++;
      @(negedge clk);
      if (ch_we) m_ch[ch_page][ch_hi][ca] = ch_word;
      if (pe_we) begin
        m_f[pe_hi][pa] = pe_f;
        m_gp[pe_hi][pa] = pe_gp;
        m_gm[pe_hi][pa] = pe_gm;
      end
      pe_we = 0; ch_we = 0;
    end
    check(n_both > 0, "no simultaneous PE and channel write");
    check(n_overlap > 0, "no channel read during a write to the other page");
    $display("simultaneous writes %0d, overlapped page accesses %0d", n_both, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
