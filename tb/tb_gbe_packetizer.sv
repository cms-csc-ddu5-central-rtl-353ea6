// tb_gbe_packetizer: a first-word-fall-through FIFO model feeds the
// packetizer and the 16-bit character stream is decoded byte by byte.
// Checked: SYNC sets during reset and IDLE sets after; every frame's
// preamble, 0xFF destination bytes, data bytes (most significant first),
// zero fill to 56 bytes, packet number, Ethernet FCS (the CRC-32 residue
// 0xDEBB20E3 over payload plus FCS, and the known FCS 0xD118758B of a
// one-word first frame) and /T/R/; the 20.48 us (1280 clock) gap between
// frames unless fifo_pae_n is high; frames ending at an end-of-event word;
// and the 8960-byte frame limit with a long event.
module tb_gbe_packetizer;
  logic clk = 0, rst = 1;
  logic fifo_empty, fifo_pae_n = 0, fifo_eoe, fifo_rd, in_frame;
  logic [63:0] fifo_data;
  logic [15:0] txd, pkt_num;
  logic [1:0] txk;
  logic [64:0] fq[$];
  int checks = 0, failures = 0;
  always #8 clk = ~clk;
  assign fifo_empty = (fq.size() == 0);
  assign fifo_data  = fifo_empty ? 64'h0 : fq[0][63:0];
  assign fifo_eoe   = fifo_empty ? 1'b0 : fq[0][64];
  always @(posedge clk) if (fifo_rd && fq.size() > 0) begin #1; void'(fq.pop_front()); end
  gbe_packetizer dut (.clk(clk), .rst(rst), .fifo_empty(fifo_empty), .fifo_pae_n(fifo_pae_n),
    .fifo_data(fifo_data), .fifo_eoe(fifo_eoe), .fifo_rd(fifo_rd), .txd(txd), .txk(txk),
    .in_frame(in_frame), .pkt_num(pkt_num));

  function automatic logic [31:0] crc_b(input logic [31:0] c, input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = c[0] ^ b[i];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return c;
  endfunction

  // ---------------- stream decoder
  logic [8:0] bytes[$];       // {k, byte}
  int cyc = 0;
  int frame_start[$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      bytes.push_back({txk[0], txd[7:0]});
      bytes.push_back({txk[1], txd[15:8]});
    end
  end

  // expected payloads (data bytes of each frame)
  logic [7:0] exp_data[$][$];
  int nframes = 0, n_sync = 0;

  task automatic push_event(input int nwords, input int seed);
    logic [7:0] cur[$];
    for (int i = 0; i < nwords; i++) begin
      logic [63:0] w;
      w = (seed == 0) ? 64'h0102030405060708 : {$urandom, $urandom};
      fq.push_back({i == nwords - 1, w});
      for (int b = 7; b >= 0; b--) cur.push_back(w[8*b +: 8]);
      if (cur.size() >= 8960 || i == nwords - 1) begin
        exp_data.push_back(cur);
        cur.delete();
      end
    end
  endtask

  initial begin
    // reset: SYNC ordered sets
    repeat (6) begin
      @(posedge clk); #1;
      checks++;
      if (!(txk == 2'b01 && (txd == 16'hB5BC || txd == 16'h42BC))) failures++;
      n_sync++;
    end
    rst = 0;
    repeat (10) @(posedge clk);
    #1;
    checks++; if (!(txk == 2'b01 && txd == 16'h50BC)) failures++;
    push_event(1, 0);               // one word: fill to 56, known FCS
    push_event(3, 1);
    push_event(20, 1);
    fifo_pae_n = 0;
    while (fq.size() > 0 || in_frame) @(posedge clk);
    // long event, FIFO "full enough": no gap wait, frames split at 8960 bytes
    fifo_pae_n = 1;
    push_event(1200, 1);
    while (fq.size() > 0 || in_frame) @(posedge clk);
    repeat (10) @(posedge clk);
    parse();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic parse();
    int i, f, last_end, fi;
    i = 0; f = 0; last_end = -1;
    while (i < bytes.size()) begin
      if (bytes[i] == 9'h1FB) begin
        logic [7:0] pl[$];
        logic [31:0] c;
        int start_i, ndb, gap;
        start_i = i;
        checks++;
        for (int k = 1; k <= 6; k++) if (bytes[i+k] != 9'h055) begin failures++; break; end
        if (bytes[i+7] != 9'h0D5) failures++;
        i += 8;
        while (!(bytes[i] == 9'h1FD)) begin pl.push_back(bytes[i][7:0]); i++; end
        checks++; if (bytes[i+1] != 9'h1F7) failures++;
        // gap to the previous frame end, in clocks
        gap = (start_i - last_end) / 2;
        if (f >= 1 && f <= 2) begin
          checks++; if (gap < 1280) begin failures++; $display("gap %0d", gap); end
        end
        if (f >= 4) begin
          checks++; if (gap > 20) begin failures++; $display("gap %0d with pae_n high", gap); end
        end
        last_end = i + 1;
        i += 2;
        // payload: 4 x FF, data, fill, packet number (2), FCS (4)
        c = 32'hFFFFFFFF;
        foreach (pl[k]) c = crc_b(c, pl[k]);
        checks++; if (c != 32'hDEBB20E3) begin failures++; $display("frame %0d residue %h", f, c); end
        if (f == 0) begin
          checks++;
          if ({pl[pl.size()-1], pl[pl.size()-2], pl[pl.size()-3], pl[pl.size()-4]} != 32'hD118758B) failures++;
        end
        checks++;
        if (pl[0] != 8'hFF || pl[1] != 8'hFF || pl[2] != 8'hFF || pl[3] != 8'hFF) failures++;
        checks++;
        if ({pl[pl.size()-6], pl[pl.size()-5]} != 16'(f)) begin failures++; $display("pkt num"); end
        ndb = pl.size() - 4 - 6;
        if (f < exp_data.size()) begin
          int n;
          n = exp_data[f].size();
          checks++;
          if (ndb != ((n < 56) ? 56 : n)) begin failures++; $display("frame %0d: %0d bytes, exp %0d", f, ndb, n); end
          for (int k = 0; k < ndb; k++) begin
            logic [7:0] e;
            e = (k < n) ? exp_data[f][k] : 8'h00;
            if (pl[4+k] != e) begin failures++; $display("frame %0d byte %0d got %h exp %h (n %0d)", f, k, pl[4+k], e, n); break; end
          end
        end
        f++;
      end else begin
        if (!(bytes[i] == 9'h1BC || bytes[i] == 9'h050 || bytes[i] == 9'h0B5 || bytes[i] == 9'h042)) begin
          failures++; $display("bad idle byte %h at %0d", bytes[i], i);
          i++;
        end
        i++;
      end
    end
    checks++;
    if (f != exp_data.size()) begin failures++; $display("%0d frames, exp %0d", f, exp_data.size()); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
