// tb_data_mem_unit -- the data memory unit in its three modes.
//
//   LIFO : random pushes and pops against a software stack, including
//          filling it completely and then draining it.
//   FIFO : random writes and reads against a software queue.
//   RAM  : sequential runs up and down after one address load, random
//          accesses (load, then access), and a load during an access,
//          against a model array.
// Each phase runs with a random set of clocked RAMs; data bits of unclocked
// RAMs are not compared, but a RAM unclocked in a later phase must keep the
// words written earlier.  Read data must appear with rvalid one cycle after
// rd.  Push and pop are never requested together in LIFO mode.
module automatic tb_data_mem_unit;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [7:0] ram_en = '1;
  mem_mode_e mode = MEM_LIFO;
  logic [31:0] wdata = '0, rdata;
  logic w_load = 0, r_load = 0, w_up = 1, r_up = 1;
  logic [5:0] w_addr0 = '0, r_addr0 = '0;
  logic rvalid;
  int checks = 0, failures = 0;
  int n_lifo = 0, n_fifo = 0, n_ram = 0, n_retained = 0;

  data_mem_unit dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] en_mask(logic [7:0] e);
    logic [31:0] m = '0;
    for (int n = 0; n < 8; n++) if (e[n]) m[n*4 +: 4] = 4'hf;
    return m;
  endfunction

  logic [31:0] exp_q[$];
  bit          exp_pending = 0;
  logic [31:0] exp_word;

  // compare each returned word at the next negedge
  task automatic step_and_check();
    @(negedge clk);
    checks++;
    if (rvalid !== exp_pending) begin
      failures++;
      if (failures < 10) $display("FAIL rvalid=%0d exp=%0d mode=%0d", rvalid, exp_pending, mode);
    end else if (exp_pending) begin
      checks++;
      if ((rdata & en_mask(ram_en)) != (exp_word & en_mask(ram_en))) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d rdata=%h exp=%h", mode, rdata, exp_word);
      end
    end
  endtask

  initial begin
    logic [31:0] stack[$];
    logic [31:0] queue[$];
    logic [31:0] mem[64];
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- LIFO, decoder pattern then random
    mode = MEM_LIFO; ram_en = 8'h0f;
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 64; i++) begin
      wr = 1; wdata = $urandom; stack.push_back(wdata);
      exp_pending = 0;
      step_and_check();
    end
    wr = 0;
    for (int i = 0; i < 64; i++) begin
      rd = 1; exp_word = stack.pop_back();
      step_and_check_delayed();
      n_lifo++;
    end
    rd = 0; exp_pending = 0; step_and_check();
    for (int t = 0; t < 500; t++) begin
      bit do_push = (stack.size() == 0) || (stack.size() < 64 && $urandom_range(0, 1) == 1);
      wr = do_push; rd = !do_push;
      if (do_push) begin wdata = $urandom; stack.push_back(wdata); end
      else exp_word = stack.pop_back();
      step_and_check_delayed();
      if (!do_push) n_lifo++;
    end
    wr = 0; rd = 0; exp_pending = 0; step_and_check();

    // ---- FIFO
    mode = MEM_FIFO; ram_en = 8'hff;
    clr = 1; @(negedge clk); clr = 0;
    for (int t = 0; t < 500; t++) begin
      bit do_w = (queue.size() < 60) && ($urandom_range(0, 1) == 1);
      bit do_r = (queue.size() > 0) && ($urandom_range(0, 1) == 1);
      wr = do_w; rd = do_r;
      if (do_r) exp_word = queue.pop_front();
      if (do_w) begin wdata = $urandom; queue.push_back(wdata); end
      step_and_check_delayed();
      if (do_r) n_fifo++;
    end
    wr = 0; rd = 0; exp_pending = 0; step_and_check();

    // ---- RAM: fill upwards with one load, read back downwards with one load
    mode = MEM_RAM; ram_en = 8'hff;
    w_load = 1; w_addr0 = 6'd0; w_up = 1;
    @(negedge clk);
    w_load = 0;
    for (int a = 0; a < 64; a++) begin
      wr = 1; wdata = $urandom; mem[a] = wdata;
      exp_pending = 0;
      step_and_check();
    end
    wr = 0;
    r_load = 1; r_addr0 = 6'd63; r_up = 0;
    @(negedge clk);
    r_load = 0;
    for (int a = 63; a >= 0; a--) begin
      rd = 1; exp_word = mem[a];
      step_and_check_delayed();
      n_ram++;
    end
    rd = 0; exp_pending = 0; step_and_check();
    // random access: load the address, access in the next cycle; fewer
    // RAMs clocked, so the upper words must keep their contents
    ram_en = 8'h03;
    for (int t = 0; t < 300; t++) begin
      bit do_w = 1'($urandom), do_r = 1'($urandom);
      logic [5:0] wa = 6'($urandom), ra = 6'($urandom);
      w_load = 1; w_addr0 = wa; r_load = 1; r_addr0 = ra;
      w_up = 1'($urandom); r_up = 1'($urandom);
      @(negedge clk);
      w_load = 0; r_load = 0;
      wr = do_w; rd = do_r; wdata = $urandom;
      if (do_r) exp_word = mem[ra];
      step_and_check_delayed();
      if (do_w) mem[wa] = (wdata & en_mask(ram_en)) | (mem[wa] & ~en_mask(ram_en));
      if (do_r) n_ram++;
      wr = 0; rd = 0;
    end
    wr = 0; rd = 0; exp_pending = 0; step_and_check();
    // a load in the same cycle as an access applies after it
    ram_en = 8'hff;
    r_load = 1; r_addr0 = 6'd10; r_up = 1;
    @(negedge clk);
    r_load = 1; r_addr0 = 6'd40; rd = 1; exp_word = mem[10];
    step_and_check_delayed();
    r_load = 0; rd = 1; exp_word = mem[40];
    step_and_check_delayed();
    rd = 1; exp_word = mem[41];
    step_and_check_delayed();
    rd = 0; exp_pending = 0; step_and_check();
    for (int a = 0; a < 64; a++) begin
      r_load = 1; r_addr0 = 6'(a);
      @(negedge clk);
      r_load = 0;
      rd = 1; exp_word = mem[a];
      step_and_check_delayed();
      rd = 0;
      n_retained++;
    end
    rd = 0; exp_pending = 0; step_and_check();

    checks += 4;
    if (n_lifo == 0 || n_fifo == 0 || n_ram == 0 || n_retained == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock with the request currently driven; a read returns its word
  // with rvalid right after this clock edge
  task automatic step_and_check_delayed();
    exp_pending = rd;
    step_and_check();
  endtask

endmodule
