// tb_fsl_fifo: self-checking testbench of the dual-clock FSL FIFO channel.
// The writer and reader run on unrelated clocks (7 ns and 10 ns, then the
// reverse). Random pushes and pops are checked against a queue model: every
// word read must be the oldest word written, `exists` must never be high for
// an empty FIFO, a fully written FIFO must report `full`, and all words must
// come out. Also checks the three-clock visibility latency of a first word.
module tb_fsl_fifo;
  localparam int W = 33, D = 16;

  logic wr_clk = 0, rd_clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, exists;
  logic [W-1:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0, fulls = 0, nwritten = 0, nread = 0;
  int wr_half = 5, rd_half = 7;
  logic [W-1:0] model[$];
  bit writer_done = 0;

  fsl_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // writer: n words, pushing with probability pw percent
  task automatic writer(input int n, input int pw);
    int k = 0;
    while (k < n) begin
      @(negedge wr_clk);
      wr_en = 0;
      if (full) fulls++;
      if (!full && $urandom_range(1, 100) <= pw) begin
        wr_en = 1;
        wr_data = W'({$urandom, $urandom});
        model.push_back(wr_data);
        k++;
      end
    end
    @(negedge wr_clk);
    wr_en = 0;
  endtask

  // reader: pops n words, reading with probability pr percent
  task automatic reader(input int n, input int pr);
    int k = 0;
    while (k < n) begin
      @(negedge rd_clk);
      rd_en = 0;
      if (exists) begin
        check(model.size() != 0, "exists only when a word was written");
        if (model.size() != 0) check(rd_data == model[0], "oldest word first");
        if ($urandom_range(1, 100) <= pr) begin
          rd_en = 1;
          void'(model.pop_front());
          k++;
        end
      end
    end
    @(negedge rd_clk);
    rd_en = 0;
  endtask

  task automatic phase(input int n, input int pw, input int pr);
    fork
      writer(n, pw);
      reader(n, pr);
    join
    repeat (6) @(negedge rd_clk);
    check(!exists && model.size() == 0, "FIFO drained");
  endtask

  initial begin
    int lat;
    #23 rst_n = 1;
    // first-word latency
    @(negedge wr_clk); wr_en = 1; wr_data = 33'h1_2345_6789; model.push_back(wr_data);
    @(negedge wr_clk); wr_en = 0;
    lat = 0;
    @(negedge rd_clk);
    while (!exists) begin @(negedge rd_clk); lat++; end
    check(lat <= 3, $sformatf("first word visible after %0d read clocks", lat));
    reader(1, 100);
    // fill completely, then drain
    writer(D, 100);
    repeat (6) @(negedge wr_clk);
    check(full, "full after DEPTH words");
    reader(D, 100);
    // random traffic, fast writer then fast reader
    phase(1500, 80, 40);
    wr_half = 7; rd_half = 4;
    phase(1500, 50, 90);
    check(fulls > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
