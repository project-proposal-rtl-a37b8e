// tb_zbt_memory: frame store with a small image (8x4) and two ZBT models.
// Phase 1 fills the capturing image and the processing image through their
// write ports at the same time. After one frame_swap the display image must
// hold what was written as processing and the processing image what was
// captured; all four readers then run together with random request timing,
// and every returned pixel is compared with a scoreboard that tracks the
// role rotation on its own. Also checked: single reads return on the fourth
// clock edge after the edge that accepted them, three swaps bring every role
// back, and there were cycles with three or more clients competing.
module tb_zbt_memory;
  import ar_pkg::*;

  localparam int W = 8, H = 4, N = W * H, AW = 6, NW = 16;

  logic clk = 0, rst = 1;
  logic frame_swap = 0;
  logic cap_wr_req = 0, prw_req = 0, prr_req = 0, vga_req = 0, lpf_req = 0;
  logic [IDX_W-1:0] cap_wr_idx = 0, prw_idx = 0, prr_idx = 0, vga_idx = 0;
  hsv_t cap_wr_pix = 0, prw_pix = 0;
  logic cap_wr_ack, prw_ack, prr_ack, vga_ack;
  logic prr_rvalid, vga_rvalid, lpf_ack, lpf_rvalid;
  hsv_t prr_rdata, vga_rdata;
  logic [IDX_W-1:0] lpf_idx [NW];
  hsv_t lpf_rdata [NW];
  logic [AW-1:0] ram_addr [2];
  logic ram_we [2];
  hsv_t ram_wdata [2], ram_rdata [2];
  logic [1:0] role_buf [3];
  int checks = 0, failures = 0;

  zbt_memory #(.IMG_W(W), .IMG_H(H), .RAM_AW(AW), .NWIN(NW)) dut (.*);
  for (genvar b = 0; b < 2; b++) begin : g_ram
    zbt_ram_model #(.AW(AW)) u_ram (.clk, .addr(ram_addr[b]), .we(ram_we[b]),
                                    .wdata(ram_wdata[b]), .rdata(ram_rdata[b]));
  end

  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < NW; j++) lpf_idx[j] = '0;
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: contents per physical image, roles tracked independently
  hsv_t ref_img [3][N];
  int   cap_b = 0, pro_b = 1, dis_b = 2;
  function automatic hsv_t pat(input int img, idx);
    return hsv_t'(24'(img * 24'h010000 + idx * 24'h000101 + 24'h0a0000));
  endfunction

  int contention = 0;
  always @(posedge clk) if (!rst)
    if (int'(cap_wr_req) + int'(prw_req) + int'(prr_req) + int'(vga_req) + int'(lpf_req) > 2) contention++;

  task automatic write_all(input bit cap);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (cap) begin cap_wr_req = 1; cap_wr_idx = IDX_W'(i); cap_wr_pix = pat(1, i); end
      else     begin prw_req = 1;    prw_idx = IDX_W'(i);    prw_pix = pat(2, i);    end
      @(posedge clk);
      while (!(cap ? cap_wr_ack : prw_ack)) @(posedge clk);
      if (cap) ref_img[cap_b][i] = pat(1, i); else ref_img[pro_b][i] = pat(2, i);
      @(negedge clk);
      if (cap) cap_wr_req = 0; else prw_req = 0;
      repeat ($urandom_range(0, 1)) @(negedge clk);
    end
  endtask

  task automatic swap();
    int t;
    @(negedge clk); frame_swap = 1;
    @(negedge clk); frame_swap = 0;
    t = dis_b; dis_b = pro_b; pro_b = cap_b; cap_b = t;
  endtask

  task automatic single_read(input bit vga, input int idx);
    int lat;
    @(negedge clk);
    if (vga) begin vga_req = 1; vga_idx = IDX_W'(idx); end
    else     begin prr_req = 1; prr_idx = IDX_W'(idx); end
    @(posedge clk);
    while (!(vga ? vga_ack : prr_ack)) @(posedge clk);
    @(negedge clk);
    if (vga) vga_req = 0; else prr_req = 0;
    lat = 0;
    while (!(vga ? vga_rvalid : prr_rvalid)) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("read latency %0d after ack, expected 4", lat); end
    checks++;
    if ((vga ? vga_rdata : prr_rdata) != ref_img[vga ? dis_b : pro_b][idx]) begin
      failures++;
      $display("%s read of %0d returned %h expected %h", vga ? "vga" : "proc", idx,
               vga ? vga_rdata : prr_rdata, ref_img[vga ? dis_b : pro_b][idx]);
    end
  endtask

  task automatic window_read();
    int id [NW];
    @(negedge clk);
    for (int j = 0; j < NW; j++) begin id[j] = $urandom_range(0, N - 1); lpf_idx[j] = IDX_W'(id[j]); end
    lpf_req = 1;
    #1;
    while (!lpf_ack) begin @(negedge clk); #1; end
    @(negedge clk);
    lpf_req = 0;
    while (!lpf_rvalid) @(negedge clk);
    for (int j = 0; j < NW; j++) begin
      checks++;
      if (lpf_rdata[j] != ref_img[dis_b][id[j]]) begin
        failures++;
        $display("window element %0d (pixel %0d) = %h expected %h", j, id[j], lpf_rdata[j], ref_img[dis_b][id[j]]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      write_all(1);
      write_all(0);
    join
    repeat (5) @(posedge clk);
    swap();
    fork
      for (int i = 0; i < N; i++) single_read(1, i);
      for (int i = 0; i < N; i++) single_read(0, (i * 5) % N);
      repeat (6) window_read();
      write_all(1);
    join
    // roles: three swaps return every image to its role
    swap(); swap(); swap();
    checks++;
    if (role_buf[BUF_CAPTURE] != 2'(cap_b) || role_buf[BUF_PROCESS] != 2'(pro_b) ||
        role_buf[BUF_DISPLAY] != 2'(dis_b)) begin
      failures++; $display("role mapping wrong after swaps");
    end
    swap();
    repeat (2) window_read();
    for (int i = 0; i < N; i += 3) single_read(1, i);
    checks++;
    if (contention == 0) begin failures++; $display("no contention was exercised"); end
    $display("cycles with three or more clients waiting: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
