// Self-checking testbench of parallel_counter: random and corner vectors for
// a 32-input and a 5-input counter, compared with a bit-by-bit count.
module tb_parallel_counter;
  logic [31:0] in32;
  logic [5:0]  cnt32;
  logic [4:0]  in5;
  logic [2:0]  cnt5;
  int checks = 0, failures = 0;

  parallel_counter #(.N(32)) dut32 (.in(in32), .count(cnt32));
  parallel_counter #(.N(5))  dut5  (.in(in5),  .count(cnt5));

  function automatic int ones(logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check32(logic [31:0] v);
    in32 = v; #1;
    checks++;
    if (int'(cnt32) != ones(v)) begin
      failures++;
      $display("FAIL N=32 in=%h count=%0d expected=%0d", v, cnt32, ones(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32('0);
    check32('1);
    for (int i = 0; i < 32; i++) check32(32'h1 << i);
    for (int i = 0; i < 500; i++) check32($urandom());
    for (int v = 0; v < 32; v++) begin
      in5 = 5'(v); #1;
      checks++;
      if (int'(cnt5) != ones(32'(v))) begin
        failures++;
        $display("FAIL N=5 in=%b count=%0d", in5, cnt5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
