// tb_fetch_unit: a byte array stands in for memory; a model I-cache hits at
// random and returns the bytes of the requested line from the requested
// offset on. A model decoder consumes a random size (never more than is
// valid), sometimes reports too few bytes, and the pipeline holds and
// redirects at random. Every cycle the IR's valid bytes must equal memory
// from the EIP+CS address on, EIP must track EIP+CS, the I-cache may only be
// asked while fewer than 16 bytes are valid, and a redirect must lead to an
// append on the very next cycle when the cache hits.
module tb_fetch_unit;
  logic clk = 0, rst_n = 0;
  logic ic_req, ic_hit, dec_not_enough, dec_uop_stall, hold, redirect, appended;
  logic [31:0] ic_addr, redirect_eip, redirect_eip_cs, eip, eip_cs;
  logic [127:0] ic_data;
  logic [4:0] ic_nbytes, ir_valid_bytes;
  logic [255:0] ir;
  logic [3:0] dec_size;
  logic [27:0] vip_cs;
  int checks = 0, failures = 0;
  logic [7:0] mem [4096];
  int cs_off = 0;    // EIP+CS - EIP, changed by redirects
  int appends = 0;

  fetch_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model I-cache.
  always_comb begin
    ic_data = '0;
    for (int i = 0; i < 16; i++)
      if (i + int'(ic_addr[3:0]) < 16) ic_data[8*i +: 8] = mem[(ic_addr + 32'(i)) % 4096];
    ic_nbytes = 5'd16 - 5'(ic_addr[3:0]);
  end

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = 8'($urandom);
    ic_hit = 0; dec_size = 0; dec_not_enough = 0; dec_uop_stall = 0; hold = 0;
    redirect = 0; redirect_eip = 0; redirect_eip_cs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      bit was_redirect;
      @(negedge clk);
      // Check the state produced by the previous cycle.
      checks++;
      for (int i = 0; i < int'(ir_valid_bytes); i++)
        if (ir[8*i +: 8] !== mem[(eip_cs + 32'(i)) % 4096]) begin
          failures++; $display("ERR IR byte %0d at %h: %h", i, eip_cs, ir[8*i +: 8]); break;
        end
      checks++;
      if (eip_cs - eip !== 32'(cs_off)) begin failures++; $display("ERR EIP/EIP+CS"); end
      was_redirect = redirect;
      // New stimulus.
      redirect = ($urandom_range(0, 40) == 0);
      hold = ($urandom_range(0, 10) == 0);
      dec_uop_stall = ($urandom_range(0, 10) == 0);
      ic_hit = was_redirect ? 1'b1 : ($urandom_range(0, 3) != 0);
      dec_not_enough = ($urandom_range(0, 6) == 0);
      dec_size = 4'($urandom_range(0, (ir_valid_bytes > 15) ? 15 : int'(ir_valid_bytes)));
      if (redirect) begin
        cs_off = $urandom_range(0, 1000);
        redirect_eip = $urandom_range(0, 3000);
        redirect_eip_cs = redirect_eip + 32'(cs_off);
      end
      #1;
      checks++;
      if (ic_req !== (!hold && !dec_uop_stall && !redirect && ir_valid_bytes < 16)) begin
        failures++; $display("ERR ic_req=%b valid=%0d", ic_req, ir_valid_bytes);
      end
      if (ic_req && ic_addr !== eip_cs + 32'(ir_valid_bytes)) begin
        checks++; failures++; $display("ERR fetch address %h eip_cs %h valid %0d", ic_addr, eip_cs, ir_valid_bytes);
      end
      if (was_redirect && !hold && !dec_uop_stall && !redirect) begin
        checks++;
        if (!appended || ir_valid_bytes != 0) begin failures++; $display("ERR no fetch right after redirect"); end
      end
      if (appended) appends++;
    end
    checks++;
    if (appends < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
