// tb_sample_register_file: random samples on 36 slots with random valid;
// after a save request for a random slot the next 30 valid samples of that slot
// must come out in order, with a randomly stalling ready, and nothing may be
// stored while idle.  Repeated for several slots.
`timescale 1ns/1ps
module tb_sample_register_file;
  logic clk = 0, rst_n = 0;
  logic save = 0, in_valid = 0, out_ready = 0;
  logic [5:0] sel = 0;
  logic [35:0][13:0] in_samples;
  logic busy, full, out_valid;
  logic [13:0] out_data;
  int checks = 0, failures = 0;
  logic [13:0] expq [$];
  int n_out;

  sample_register_file dut (.clk, .rst_n, .save, .sel, .in_samples, .in_valid,
                            .busy, .full, .out_data, .out_valid, .out_ready);

  always #2.5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 36; i++) in_samples[i] = 14'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 6; rep++) begin
      int s;
      s = $urandom % 36;
      // idle traffic: must not be stored
      repeat (20) begin
        @(negedge clk);
        in_valid = 1'($urandom); for (int i = 0; i < 36; i++) in_samples[i] = 14'($urandom);
      end
      @(negedge clk); save = 1; sel = 6'(s); in_valid = 0;
      @(negedge clk); save = 0;
      expq.delete();
      // fill
      while (expq.size() < 30) begin
        in_valid = 1'($urandom);
        for (int i = 0; i < 36; i++) in_samples[i] = 14'($urandom);
        if (in_valid) expq.push_back(in_samples[s]);
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (!full || !out_valid) begin failures++; $display("not full after 30 samples"); end
      // drain
      n_out = 0;
      while (n_out < 30) begin
        out_ready = 1'($urandom);
        #0.1;
        if (out_ready) begin
          checks++;
          if (!out_valid || out_data != expq[n_out]) begin
            failures++; $display("sample %0d: %h exp %h", n_out, out_data, expq[n_out]);
          end
          n_out++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (busy) begin failures++; $display("still busy after read-out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
