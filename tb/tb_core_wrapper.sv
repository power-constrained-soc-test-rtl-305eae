// tb_core_wrapper: a wrapper with 3 chains, 5 input and 4 output cells
// around internal chains of 2 flip-flops modelled in the bench. A software
// model of each wrapper chain (input cells, internal chain, output cells, in
// scan order) is compared with wso on every cycle under random shifts and
// captures. Checks the chain lengths, that input cells hold and output
// cells capture the core outputs at a capture, that the core terminals see
// the input cells in test mode and the functional values in normal mode.
module tb_core_wrapper;
  localparam int S = 3, NPI = 5, NPO = 4, L = 2;
  logic clk = 0, rst_n = 0, test_mode = 0, shift = 0, capture = 0;
  logic [S-1:0] wsi = '0, wso, int_si, int_so;
  logic int_shift, int_capture;
  logic [NPI-1:0] pi_ext = '0, pi_core;
  logic [NPO-1:0] po_core, po_ext;
  logic [L-1:0] ich [S];
  int checks = 0, failures = 0;

  core_wrapper #(.S_M(S), .NPI(NPI), .NPO(NPO)) dut (.*);

  // internal chains of the bench's core; its outputs are the inputs inverted,
  // XORed with the first flip-flop of chain 0
  for (genvar c = 0; c < S; c++) begin : g_ic
    assign int_so[c] = ich[c][L-1];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) ich[c] <= '0;
      else if (int_shift) ich[c] <= {ich[c][L-2:0], int_si[c]};
  end
  always_comb
    for (int k = 0; k < NPO; k++) po_core[k] = ~pi_core[k % NPI] ^ ich[0][0];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chain model: positions 0 .. len-1 from wsi to wso
  bit ch [S][16];
  int ni [S], no [S], len [S];

  initial begin
    int n_cap = 0;
    for (int c = 0; c < S; c++) begin
      ni[c] = (NPI - c + S - 1) / S;
      no[c] = (NPO - c + S - 1) / S;
      len[c] = ni[c] + L + no[c];
      for (int p = 0; p < 16; p++) ch[c][p] = 0;
    end
    check(len[0] == 2 + L + 2 && len[1] == 2 + L + 1 && len[2] == 1 + L + 1, "chain lengths");
    repeat (2) @(negedge clk);
    rst_n = 1;
    // normal mode: terminals pass straight through
    for (int i = 0; i < 20; i++) begin
      pi_ext = NPI'($urandom); #1;
      check(pi_core == pi_ext && po_ext == po_core, "normal mode pass-through");
      @(negedge clk);
    end
    test_mode = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit nch [S][16];
      shift   = ($urandom % 3) != 0;
      capture = !shift && (($urandom % 5) == 0);
      wsi     = S'($urandom);
      pi_ext  = NPI'($urandom);
      #1;
      for (int c = 0; c < S; c++) check(wso[c] == ch[c][len[c]-1], $sformatf("chain %0d end", c));
      for (int k = 0; k < NPI; k++) check(pi_core[k] == ch[k % S][k / S], "input cell drives core input");
      check(int_shift == shift && int_capture == capture, "clocks passed to core");
      nch = ch;
      if (shift) begin
        for (int c = 0; c < S; c++) begin
          for (int p = len[c] - 1; p > 0; p--) nch[c][p] = ch[c][p-1];
          nch[c][0] = wsi[c];
        end
      end else if (capture) begin
        for (int k = 0; k < NPO; k++)
          nch[k % S][ni[k % S] + L + k / S] = po_core[k];
        n_cap++;
      end
      ch = nch;
      @(negedge clk);
    end
    check(n_cap > 100, "captures seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
