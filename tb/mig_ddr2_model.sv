// mig_ddr2_model: behavioural model of a DDR2 controller user interface
// together with the memory behind it, for simulation only.
//
// Commands (app_af_cmd: 000 write, 001 read) and write data beats (128 bit,
// two per command, low half first) are queued as they are offered. Commands
// are executed in order, one every CMD_CYCLES clocks; a write needs both of
// its data beats to be queued. Written data is stored per 64-bit location in
// a sparse array: beat 0 holds locations addr, addr+1 and beat 1 addr+2,
// addr+3. A read returns its two beats on rd_data_valid READ_LAT clocks
// after it executes, one beat per clock. app_af_afull / app_wdf_afull rise
// when a queue holds AFULL entries, and also at random in STALL_PCT percent
// of clocks to exercise back-pressure. phy_init_done rises INIT_CYCLES
// clocks after reset.
module mig_ddr2_model #(
  parameter int unsigned INIT_CYCLES = 20,
  parameter int unsigned CMD_CYCLES  = 2,
  parameter int unsigned READ_LAT    = 8,
  parameter int unsigned AFULL       = 12,
  parameter int unsigned STALL_PCT   = 0
) (
  input  logic         clk,
  input  logic         rst,
  output logic         phy_init_done,
  input  logic         app_af_wren,
  input  logic [2:0]   app_af_cmd,
  input  logic [30:0]  app_af_addr,
  output logic         app_af_afull,
  input  logic         app_wdf_wren,
  input  logic [127:0] app_wdf_data,
  input  logic [15:0]  app_wdf_mask_data,
  output logic         app_wdf_afull,
  output logic         rd_data_valid,
  output logic [127:0] rd_data_fifo_out
);

  typedef struct packed { logic [2:0] cmd; logic [30:0] addr; } af_t;
  typedef struct packed { longint unsigned t; logic [127:0] d; } rd_t;

  af_t             afq[$];
  logic [127:0]    wdfq[$];
  rd_t             rdq[$];
  logic [63:0]     mem [longint unsigned];
  int unsigned     init_cnt, busy;
  longint unsigned now;
  logic            rnd_stall;

  int unsigned     writes, reads, stalls;

  function automatic logic [63:0] peek(input longint unsigned loc);
    return mem.exists(loc) ? mem[loc] : 64'hDEAD_BEEF_DEAD_BEEF;
  endfunction

  assign app_af_afull  = afq.size() >= AFULL || rnd_stall;
  assign app_wdf_afull = wdfq.size() >= 2 * AFULL || rnd_stall;

  always_ff @(posedge clk) begin
    if (rst) begin
      afq.delete(); wdfq.delete(); rdq.delete();
      init_cnt      <= 0;
      phy_init_done <= 1'b0;
      busy          <= 0;
      now           <= 0;
      rd_data_valid <= 1'b0;
      rd_data_fifo_out <= '0;
      rnd_stall     <= 1'b0;
      writes <= 0; reads <= 0; stalls <= 0;
    end else begin
      now <= now + 1;
      rnd_stall <= (STALL_PCT != 0) && ($urandom_range(99) < STALL_PCT);
      if (rnd_stall) stalls <= stalls + 1;
      if (init_cnt < INIT_CYCLES) init_cnt <= init_cnt + 1;
      else phy_init_done <= 1'b1;
      if (app_af_wren) begin
        afq.push_back('{cmd: app_af_cmd, addr: app_af_addr});
        assert (phy_init_done) else $error("mig model: command before init");
        assert (app_af_addr[1:0] == 2'b00) else $error("mig model: unaligned address");
      end
      if (app_wdf_wren) wdfq.push_back(app_wdf_data);
      // execute
      if (busy != 0) busy <= busy - 1;
      else if (afq.size() != 0) begin
        if (afq[0].cmd == 3'b000) begin
          if (wdfq.size() >= 2) begin
            logic [127:0] b0, b1;
            longint unsigned a;
            a  = longint'(afq[0].addr);
            b0 = wdfq.pop_front();
            b1 = wdfq.pop_front();
            mem[a]   = b0[63:0];
            mem[a+1] = b0[127:64];
            mem[a+2] = b1[63:0];
            mem[a+3] = b1[127:64];
            void'(afq.pop_front());
            writes <= writes + 1;
            busy   <= CMD_CYCLES - 1;
          end
        end else begin
          longint unsigned a;
          a = longint'(afq[0].addr);
          rdq.push_back('{t: now + READ_LAT,     d: {peek(a+1), peek(a)}});
          rdq.push_back('{t: now + READ_LAT + 1, d: {peek(a+3), peek(a+2)}});
          void'(afq.pop_front());
          reads <= reads + 1;
          busy  <= CMD_CYCLES - 1;
        end
      end
      // return read data
      rd_data_valid <= 1'b0;
      if (rdq.size() != 0 && rdq[0].t <= now) begin
        rd_data_valid    <= 1'b1;
        rd_data_fifo_out <= rdq[0].d;
        void'(rdq.pop_front());
      end
    end
  end

endmodule
