// Self-checking testbench of bira_cam: random writes, searches, clears and
// valid-vector restores on an 8-entry, 6-bit CAM, compared with a model.
module tb_bira_cam;
  localparam int D = 8, WD = 6;
  logic clk = 0, rst_n = 0;
  logic clear, restore, we;
  logic [D-1:0] restore_valid, match, valid;
  logic [2:0] waddr;
  logic [WD-1:0] wdata, key;
  logic [D-1:0][WD-1:0] words;
  logic [WD-1:0] m_words [D];
  logic [D-1:0]  m_valid;
  int checks = 0, failures = 0;

  bira_cam #(.DEPTH(D), .WIDTH(WD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; restore = 0; we = 0; restore_valid = '0; waddr = '0; wdata = '0; key = '0;
    m_valid = '0;
    for (int i = 0; i < D; i++) m_words[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check search of the current contents with a key that often hits
      key = ($urandom_range(0, 1) && m_valid != '0) ? m_words[$urandom_range(0, D-1)] : WD'($urandom());
      #1;
      for (int i = 0; i < D; i++) begin
        checks++;
        if (match[i] != (m_valid[i] && m_words[i] == key) || valid[i] != m_valid[i]) begin
          failures++;
          $display("FAIL t=%0d entry %0d match=%b valid=%b", t, i, match[i], valid[i]);
        end
      end
      clear   = ($urandom_range(0, 99) == 0);
      restore = ($urandom_range(0, 19) == 0);
      restore_valid = D'($urandom());
      we      = ($urandom_range(0, 1) == 1);
      waddr   = 3'($urandom());
      wdata   = WD'($urandom_range(0, 15));
      @(posedge clk);
      if (clear) m_valid = '0;
      else if (restore) m_valid = restore_valid;
      else if (we) begin m_valid[waddr] = 1'b1; m_words[waddr] = wdata; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
