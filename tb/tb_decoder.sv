// tb_decoder: sends a command stream (vector segment, batches, read-out,
// an ignored NOP) and checks what comes out: vector words written at
// addresses 0..n-1, matrix beats pushed with their bank (rotating 0,1,2,0)
// and the last-beat flag, one bank open per batch with its first row and
// first-block flag, and the read-out request. It also checks the waits: no
// vector write while pipe_idle is low, no open while the bank is busy, no
// push while the matrix buffer is full, and no read-out before all banks
// are free.
module tb_decoder;
  import spmv_pkg::*;
  localparam int unsigned BLOCK_W = 256;
  localparam int unsigned ROWS    = 1024;
  localparam int unsigned WAW     = $clog2(BLOCK_W) - 3;
  localparam int unsigned PAW     = $clog2(ROWS / 8);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [MEM_W-1:0] in_data = '0;
  logic vb_load_en, mb_push, open_valid, open_zero, wb_start, at_header;
  logic [WAW-1:0] vb_load_addr;
  logic [MEM_W-1:0] vb_load_data;
  logic pipe_idle = 1, mb_full = 0, all_free = 1, wb_busy = 0;
  coo_t [LANES-1:0] mb_din;
  tag_t mb_tag;
  logic [BANK_W-1:0] open_bank;
  logic [IW-1:0] open_base, wb_words;
  logic [NBANK-1:0] bank_free = '1;
  logic [PAW-1:0] wb_addr;
  int checks = 0, failures = 0;

  decoder #(.BLOCK_W(BLOCK_W), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MEM_W-1:0] stream[$];
  // expected events
  int exp_vaddr[$];  logic [MEM_W-1:0] exp_vdata[$];
  logic [MEM_W-1:0] exp_mword[$]; tag_t exp_mtag[$];
  int exp_open_bank[$], exp_open_base[$]; bit exp_open_zero[$];
  int n_wb = 0, n_blocked = 0;

  function automatic logic [MEM_W-1:0] header(op_e op, int n, int row, bit fb);
    logic [MEM_W-1:0] w = '0;
    w[OP_LSB +: 8] = op; w[31:0] = 32'(n); w[63:32] = 32'(row); w[64] = fb;
    return w;
  endfunction
  function automatic logic [MEM_W-1:0] rnd_word();
    logic [MEM_W-1:0] w;
    for (int k = 0; k < 16; k++) w[k*32 +: 32] = $urandom();
    w[OP_LSB +: 8] = 8'h00;
    return w;
  endfunction

  // pipe_idle / bank_free / mb_full / all_free toggled at random
  always @(negedge clk) if (rst_n) begin
    pipe_idle <= ($urandom_range(3) != 0);
    mb_full   <= ($urandom_range(4) == 0);
    bank_free <= NBANK'($urandom());
    all_free  <= ($urandom_range(3) == 0);
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (vb_load_en) begin
      checks++;
      if (!exp_vaddr.size() || vb_load_addr !== WAW'(exp_vaddr[0]) || vb_load_data !== exp_vdata[0]) begin
        failures++; $display("FAIL vector write %0d", vb_load_addr);
      end else begin void'(exp_vaddr.pop_front()); void'(exp_vdata.pop_front()); end
    end
    if (mb_push) begin
      checks++;
      if (mb_full || !exp_mword.size() || mb_din !== exp_mword[0][LANES*128-1:0] || mb_tag !== exp_mtag[0]) begin
        failures++; $display("FAIL matrix push (tag %b)", mb_tag);
      end else begin void'(exp_mword.pop_front()); void'(exp_mtag.pop_front()); end
    end
    if (open_valid) begin
      checks++;
      if (!bank_free[open_bank] || !exp_open_bank.size() || open_bank !== BANK_W'(exp_open_bank[0]) ||
          open_base !== 32'(exp_open_base[0]) || open_zero !== exp_open_zero[0]) begin
        failures++; $display("FAIL open bank %0d base %0d", open_bank, open_base);
      end else begin void'(exp_open_bank.pop_front()); void'(exp_open_base.pop_front()); void'(exp_open_zero.pop_front()); end
    end
    if (wb_start) begin
      checks++; n_wb++;
      if (!all_free || !pipe_idle || wb_addr !== PAW'(128 / 8) || wb_words !== 32'd5) begin
        failures++; $display("FAIL read-out start");
      end
    end
    if (in_valid && !in_ready) n_blocked++;
  end

  initial begin
    int bank = 0;
    stream.push_back(header(OP_NOP, 3, 0, 0));
    for (int rep = 0; rep < 2; rep++) begin
      stream.push_back(header(OP_LDV, 6, 0, 0));
      for (int w = 0; w < 6; w++) begin
        logic [MEM_W-1:0] d = rnd_word();
        stream.push_back(d); exp_vaddr.push_back(w); exp_vdata.push_back(d);
      end
      for (int t = 0; t < 5; t++) begin
        int n = 1 + int'($urandom_range(4));
        tag_t tg;
        stream.push_back(header(OP_LDM, n, t * 64, rep == 0));
        exp_open_bank.push_back(bank); exp_open_base.push_back(t * 64); exp_open_zero.push_back(rep == 0);
        for (int w = 0; w < n; w++) begin
          logic [MEM_W-1:0] d = rnd_word();
          stream.push_back(d); exp_mword.push_back(d);
          tg.beat = 1; tg.last = (w == n - 1); tg.bank = BANK_W'(bank);
          exp_mtag.push_back(tg);
        end
        bank = (bank + 1) % NBANK;
      end
    end
    stream.push_back(header(OP_WB, 5, 128, 0));
    stream.push_back(header(OP_NOP, 0, 0, 0));

    repeat (2) @(posedge clk);
    rst_n = 1;
    while (stream.size() > 0) begin
      @(negedge clk);
      in_valid = 1; in_data = stream[0];
      @(posedge clk);
      if (in_ready) void'(stream.pop_front());
      // read-out: busy for a few cycles after the start
      if (wb_start) fork begin @(negedge clk); wb_busy = 1; repeat (4) @(negedge clk); wb_busy = 0; end join_none
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_vaddr.size() || exp_mword.size() || exp_open_bank.size() || n_wb != 1 || !at_header) begin
      failures++; $display("FAIL missing events: %0d %0d %0d wb %0d", exp_vaddr.size(), exp_mword.size(), exp_open_bank.size(), n_wb);
    end
    checks++;
    if (n_blocked == 0) begin failures++; $display("FAIL stream never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
