// Self-checking testbench of ksubset_enum. For N = 8 and every length LEN
// and weight k <= LEN, it starts at the k low ones and steps through the
// enumerator until last, checking each next vector against the next larger
// number of the same weight (found by counting upwards) and the number of
// vectors visited against the binomial coefficient C(LEN, k). Both the
// Kogge-Stone and the serial prefix configurations are checked.
module tb_ksubset_enum;
  localparam int N = 8;
  logic [N-1:0] cur;
  logic [3:0]   len;
  logic [N-1:0] nxt_ks, nxt_sr;
  logic         last_ks, last_sr;
  int checks = 0, failures = 0;

  ksubset_enum #(.N(N), .STYLE(0)) dut_ks (.cur(cur), .len(len), .next(nxt_ks), .last(last_ks));
  ksubset_enum #(.N(N), .STYLE(1)) dut_sr (.cur(cur), .len(len), .next(nxt_sr), .last(last_sr));

  function automatic int weight(int v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  function automatic int binom(int n, int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return int'(r);
  endfunction

  // next larger value below 2**l with the same weight, or -1
  function automatic int ref_next(int v, int l);
    for (int u = v + 1; u < (1 << l); u++)
      if (weight(u) == weight(v)) return u;
    return -1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= N; l++) begin
      for (int k = 0; k <= l; k++) begin
        int visited, expect_next;
        bit stop;
        cur = N'((1 << k) - 1);
        len = 4'(l);
        visited = 0;
        stop = 0;
        while (!stop) begin
          #1;
          visited++;
          expect_next = ref_next(int'(cur), l);
          checks++;
          if (last_ks != last_sr) begin
            failures++;
            $display("FAIL last differs cur=%b len=%0d", cur, l);
          end
          if (k == 0 || expect_next < 0) begin
            if (!last_ks) begin
              failures++;
              $display("FAIL last missing cur=%b len=%0d", cur, l);
            end
            stop = 1;
          end else begin
            checks++;
            if (last_ks || int'(nxt_ks) != expect_next || nxt_sr != nxt_ks) begin
              failures++;
              $display("FAIL cur=%b len=%0d next=%b/%b last=%b expected=%b",
                       cur, l, nxt_ks, nxt_sr, last_ks, N'(expect_next));
              stop = 1;
            end
            cur = nxt_ks;
          end
          if (visited > 300) stop = 1;
        end
        checks++;
        if (visited != binom(l, k)) begin
          failures++;
          $display("FAIL len=%0d k=%0d visited %0d vectors, expected %0d",
                   l, k, visited, binom(l, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
