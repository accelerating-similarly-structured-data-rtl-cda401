// tb_llc_fill_router: requests with random demand/prefetch and cache/stream bits
// are returned by a model memory out of order; each fill must go to the stream
// buffer exactly when its request was a stream load, and to the cache otherwise
// with the request's address and prefetch bit. A full stream buffer must hold a
// stream fill; a full request buffer must refuse requests.
module tb_llc_fill_router;
  localparam int E = 8, AW = 48, DW = 64, NREQ = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, req_prefetch, req_stream;
  logic [AW-1:0] req_addr;
  logic mem_req_valid; logic [AW-1:0] mem_req_addr; logic [2:0] mem_req_tag;
  logic fill_valid, fill_ready; logic [2:0] fill_tag; logic [DW-1:0] fill_data;
  logic sb_valid, sb_ready; logic [DW-1:0] sb_data;
  logic llc_valid, llc_prefetch; logic [AW-1:0] llc_addr; logic [DW-1:0] llc_data;

  llc_fill_router #(.ENTRIES(E), .ADDR_W(AW), .DATA_W(DW)) dut (.*);

  typedef struct { logic [AW-1:0] addr; logic pf, st; logic [2:0] tag; } req_t;
  req_t outst [$];
  int issued = 0, filled = 0, to_sb = 0, to_llc = 0, refused = 0, held = 0, cur = -1;

  always @(posedge clk) if (rst_n) begin
    if (req_valid && !req_ready) refused++;
    if (mem_req_valid) begin
      checks++;
      if (mem_req_addr != req_addr) begin failures++; $display("memory request address"); end
      outst.push_back('{req_addr, req_prefetch, req_stream, mem_req_tag});
      issued++;
    end
    if (fill_valid && !fill_ready) held++;
    if (fill_valid && fill_ready) begin
      req_t r;
      r = outst[cur];
      checks++;
      if (r.st) begin
        if (!sb_valid || llc_valid || sb_data != fill_data) begin failures++; $display("stream fill misrouted"); end
        to_sb++;
      end else begin
        if (sb_valid || !llc_valid || llc_addr != r.addr || llc_prefetch != r.pf || llc_data != fill_data) begin
          failures++; $display("cache fill misrouted");
        end
        to_llc++;
      end
      outst.delete(cur);
      filled++;
      cur = -1;
    end
  end

  // Requests
  always @(negedge clk) if (rst_n) begin
    if (!(req_valid && !req_ready) || $urandom_range(0,3) == 0) begin
      req_valid    <= (issued < NREQ) && ($urandom_range(0, 2) != 0);
      req_addr     <= {$urandom, 16'h0} | AW'($urandom);
      req_prefetch <= $urandom_range(0,1);
      req_stream   <= $urandom_range(0,1);
    end
    sb_ready <= $urandom_range(0, 3) != 0;
    // memory returns a random outstanding request, slowly at first so the buffer fills
    // a fill stays presented until accepted (cur is cleared on acceptance)
    if (cur == -1) begin
      if (outst.size() != 0 && $urandom_range(0, 99) < ((issued < 100) ? 20 : 60)) begin
        cur = $urandom_range(0, outst.size()-1);
        fill_valid <= 1; fill_tag <= outst[cur].tag; fill_data <= {$urandom, $urandom};
      end else begin
        fill_valid <= 0;
      end
    end
  end

  initial begin
    req_valid = 0; req_addr = 0; req_prefetch = 0; req_stream = 0;
    fill_valid = 0; fill_tag = 0; fill_data = 0; sb_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (issued == NREQ && filled == NREQ);
    @(posedge clk);
    checks++;
    if (refused == 0 || held == 0 || to_sb == 0 || to_llc == 0) begin
      failures++; $display("missing case: refused=%0d held=%0d sb=%0d llc=%0d", refused, held, to_sb, to_llc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: issued %0d filled %0d", issued, filled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
