// tb_syn_check: sweeps of random base rows (degree 1..6) through the decision
// unit. The syndrome of each sweep is either the true parity of the hard
// decisions (LLR < 0 -> 1) or that parity with one random bit flipped;
// ok after the sweep must say which.
module tb_syn_check;
  localparam int Q = 8, W = 8;

  logic                clk = 0, rst_n = 0, en = 0, clr = 0, row_last = 0, ok;
  logic signed [W-1:0] llr [Q];
  logic [Q-1:0]        syn_row;
  int                  checks = 0, failures = 0;

  syn_check #(.Q(Q), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows, deg, bad_row, nerr;
    logic [Q-1:0] par;
    for (int l = 0; l < Q; l++) llr[l] = '0;
    syn_row = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int sweep = 0; sweep < 300; sweep++) begin
      rows = $urandom_range(8, 1);
      bad_row = (sweep % 2 == 0) ? -1 : int'($urandom_range(rows - 1));
      nerr = 0;
      for (int r = 0; r < rows; r++) begin
        deg = $urandom_range(6, 1);
        par = '0;
        for (int k = 0; k < deg; k++) begin
          @(negedge clk);
          en = 1; clr = (r == 0 && k == 0); row_last = (k == deg - 1);
          for (int l = 0; l < Q; l++) begin
            llr[l] = W'($urandom);
            par[l] ^= (llr[l] < 0);
          end
          syn_row = par;
          if (r == bad_row) syn_row[$urandom_range(Q - 1)] ^= 1'b1;
        end
      end
      @(negedge clk);
      en = 0; clr = 0; row_last = 0;
      for (int l = 0; l < Q; l++) llr[l] = W'($urandom);  // ignored while en is low
      @(negedge clk);
      checks++;
      if (ok != (bad_row < 0)) begin failures++; $display("sweep %0d ok=%0d bad_row=%0d", sweep, ok, bad_row); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
