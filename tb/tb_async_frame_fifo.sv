// tb_async_frame_fifo: self-checking test of async_frame_fifo.
//
// Writer (8 ns clock) and reader (11 ns clock) run independently. The
// writer sends frames of random length and commits or drops each at
// random; a model queue holds only committed entries. The reader pops at
// random and compares every entry with the model, so dropped entries must
// never appear and order must be kept. Directed parts check that
// uncommitted data stays invisible, that a commit becomes visible within
// four read clocks, and that wr_full rises at DEPTH entries and clears on a
// drop.
module tb_async_frame_fifo;

  localparam int AW = 4;
  localparam int DEPTH = 1 << AW;

  logic wr_clk = 0, rd_clk = 0;
  logic wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, wr_commit = 0, wr_drop = 0, wr_full;
  logic [8:0] wr_data = 0;
  logic rd_en = 0, rd_empty;
  logic [8:0] rd_data;

  int checks = 0, failures = 0;

  always #4 wr_clk = ~wr_clk;
  always #5.5 rd_clk = ~rd_clk;

  async_frame_fifo #(.DATA_W (9), .ADDR_W (AW)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] model [$];
  logic [8:0] pending [$];
  bit writer_done = 0;
  int popped = 0;

  // random reader
  initial begin
    wait (rd_rst_n);
    forever begin
      @(negedge rd_clk);
      rd_en = 0;
      if (!rd_empty && $urandom_range(3) != 0) begin
        check(model.size() > 0, "entry appears that was never committed");
        if (model.size() > 0) begin
          logic [8:0] e;
          e = model.pop_front();
          check(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
        end
        rd_en = 1;
        popped++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge rd_clk);
    wr_rst_n = 1;
    rd_rst_n = 1;
    // ---- random traffic ----
    for (int f = 0; f < 300; f++) begin
      int len;
      bit keep;
      len  = $urandom_range(1, 10);
      keep = ($urandom_range(3) != 0);
      pending.delete();
      for (int i = 0; i < len; i++) begin
        @(negedge wr_clk);
        wr_commit = 0;
        wr_drop   = 0;
        wr_en     = 0;
        while (wr_full) @(negedge wr_clk);
        wr_en   = 1;
        wr_data = 9'($urandom);
        pending.push_back(wr_data);
        if (i == len - 1) begin
          wr_commit = keep;
          wr_drop   = !keep;
        end
      end
      @(negedge wr_clk);
      if (keep) foreach (pending[i]) model.push_back(pending[i]);
      wr_en = 0; wr_commit = 0; wr_drop = 0;
    end
    // drain
    repeat (200) @(negedge rd_clk);
    check(model.size() == 0, "all committed entries read");
    check(rd_empty, "empty after draining");

    // ---- directed: uncommitted data invisible, commit latency ----
    for (int i = 0; i < 5; i++) begin
      @(negedge wr_clk);
      wr_en = 1; wr_data = 9'(i);
    end
    @(negedge wr_clk);
    wr_en = 0;
    repeat (10) @(negedge rd_clk);
    check(rd_empty, "uncommitted frame invisible");
    @(negedge wr_clk);
    wr_commit = 1;
    @(negedge wr_clk);
    wr_commit = 0;
    for (int i = 0; i < 5; i++) model.push_back(9'(i));
    begin
      int n;
      n = 0;
      while (rd_empty && n < 20) begin
        @(posedge rd_clk);
        n++;
      end
      check(n <= 4, $sformatf("commit visible after %0d read clocks", n));
    end
    repeat (40) @(negedge rd_clk);
    check(model.size() == 0, "directed frame read");

    // ---- directed: full and drop ----
    for (int i = 0; i < DEPTH + 1; i++) begin
      @(negedge wr_clk);
      wr_en = 1; wr_data = 9'h100 | 9'(i);
      if (i == DEPTH) check(wr_full, "full after DEPTH uncommitted entries");
    end
    @(negedge wr_clk);
    wr_en = 0;
    wr_drop = 1;
    @(negedge wr_clk);
    wr_drop = 0;
    check(!wr_full, "drop clears full");
    repeat (10) @(negedge rd_clk);
    check(rd_empty, "dropped frame never visible");
    check(popped > 500, $sformatf("reader was busy (%0d)", popped));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
