// mig_model: behavioural model of the DDR3 memory interface user side and
// the DDR3 memory behind it.
//
// A sparse 128-bit-word memory addressed by byte address / 16. Write data
// are queued when app_wdf_wren && app_wdf_rdy and consumed by the next write
// command. Read commands return their word READ_LAT clocks later, in order,
// on app_rd_data_valid. app_rdy and app_wdf_rdy drop pseudo-randomly
// STALL_PCT percent of the clocks. Unwritten words read as zero.
module mig_model #(
  parameter int READ_LAT  = 20,
  parameter int STALL_PCT = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         app_en,
  input  logic [2:0]   app_cmd,
  input  logic [27:0]  app_addr,
  output logic         app_rdy,
  input  logic [127:0] app_wdf_data,
  input  logic         app_wdf_wren,
  input  logic         app_wdf_end,
  output logic         app_wdf_rdy,
  output logic [127:0] app_rd_data,
  output logic         app_rd_data_valid
);
  logic [127:0] mem [int unsigned];
  logic [127:0] wq [$];
  logic [127:0] rq_data [$];
  longint       rq_time [$];
  longint       now;
  int           writes, reads, cmd_stalls, wdf_stalls, bad_writes;

  always_ff @(posedge clk) begin
    if (rst) begin
      now <= 0; writes <= 0; reads <= 0; cmd_stalls <= 0; wdf_stalls <= 0; bad_writes <= 0;
      app_rdy <= 1'b0; app_wdf_rdy <= 1'b0; app_rd_data_valid <= 1'b0; app_rd_data <= '0;
    end else begin
      now <= now + 1;
      if (app_wdf_wren && app_wdf_rdy) begin
        wq.push_back(app_wdf_data);
        if (!app_wdf_end) bad_writes <= bad_writes + 1;
      end
      if (app_wdf_wren && !app_wdf_rdy) wdf_stalls <= wdf_stalls + 1;
      if (app_en && !app_rdy) cmd_stalls <= cmd_stalls + 1;
      if (app_en && app_rdy) begin
        if (app_cmd == 3'b000) begin
          if (wq.size() == 0) bad_writes <= bad_writes + 1;
          else mem[32'(app_addr >> 4)] = wq.pop_front();
          writes <= writes + 1;
        end else if (app_cmd == 3'b001) begin
          rq_data.push_back(mem.exists(32'(app_addr >> 4)) ? mem[32'(app_addr >> 4)] : '0);
          rq_time.push_back(now + READ_LAT);
          reads <= reads + 1;
        end
      end
      app_rd_data_valid <= 1'b0;
      if (rq_time.size() != 0 && rq_time[0] <= now) begin
        app_rd_data_valid <= 1'b1;
        app_rd_data       <= rq_data.pop_front();
        void'(rq_time.pop_front());
      end
      app_rdy     <= ($urandom_range(99) >= STALL_PCT);
      app_wdf_rdy <= ($urandom_range(99) >= STALL_PCT);
    end
  end
endmodule
