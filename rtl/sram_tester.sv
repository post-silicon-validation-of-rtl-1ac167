// sram_tester: the FPGA test bench that drives the SRAM block.
//
// It runs on tb_clk, which is also the SRAM clock, and changes its outputs on
// the falling edge so that they are stable at the SRAM's rising edge.  After
// reset a cycle counter first writes the special registers (register 1, then
// register 2, each with one Spreg_Clk pulse), and when it reaches 15 raises
// start_write_read.  The address generator then sweeps all N_ADDR addresses
// of one array, selected by cfg_sram_sel, writing the data pattern and/or
// reading, depending on cfg_mode:
//   MODE_WR_RD  write every address, then read every address
//   MODE_WR     write only          MODE_RD  read only
//   MODE_PUF    write, set PUF bit (register 1 bit 31), read (PUF read),
//               clear PUF bit, read again (normal read)      -- "w_p_r"
// Read and write are never high together.  Two cycles after the last read
// stop_test goes high and stays high.  The sweep starts at address
// START_ADDR and the address is the sweep count XOR START_ADDR, so the sweep
// begins at bank 0 / word line 0 / top half (14'h0400) and ends at bank 7 /
// word line 127 / bottom half (14'h3BFF) while covering every address.
// Data patterns are in tc25_pkg (all ones, all zeros, address, ~address).
// Comparing the read data is left to the host that reads the trace.
module sram_tester
  import tc25_pkg::*;
#(
  parameter int unsigned N_ADDR     = 16384,
  parameter logic [13:0] START_ADDR = 14'h0400,
  parameter int unsigned START_CNT  = 15
) (
  input  logic        tb_clk,
  input  logic        rst_n,
  // test selection (static for a run)
  input  logic [1:0]  cfg_mode,
  input  logic [1:0]  cfg_pattern,
  input  logic [1:0]  cfg_sram_sel,
  input  logic [31:0] cfg_spreg1,
  input  logic [31:0] cfg_spreg2,
  // to the SRAM block
  output logic [13:0] address,
  output logic [31:0] datain,
  output logic        read,
  output logic        write,
  output logic [1:0]  sram_sel,
  output logic        spreg_clk,
  output logic [3:0]  spreg_addr,
  // status
  output logic        start_write_read,
  output logic        stop_test,
  output logic        puf_phase
);
  localparam logic [1:0] MODE_WR_RD = 2'd0;
  localparam logic [1:0] MODE_WR    = 2'd1;
  localparam logic [1:0] MODE_RD    = 2'd2;
  localparam logic [1:0] MODE_PUF   = 2'd3;
  localparam int unsigned CW = $clog2(N_ADDR);

  typedef enum logic [3:0] {
    S_CFG, S_WRITE, S_PUF_ON, S_READ_P, S_PUF_OFF, S_READ, S_DRAIN, S_DONE
  } st_e;

  st_e          st;
  logic [4:0]   cnt;      // start-up cycle counter
  logic [CW-1:0] sweep;
  logic [2:0]   sub;      // step inside a special-register write
  logic [13:0]  cur_addr;

  assign cur_addr = 14'(sweep) ^ (START_ADDR & 14'(N_ADDR - 1));
  assign sram_sel = cfg_sram_sel;

  // A special-register write takes three steps (sp_s = 0, 1, 2): put the
  // address and value out, raise Spreg_Clk, lower it.
  always_ff @(negedge tb_clk or negedge rst_n) begin
    logic        sp_do;
    logic [3:0]  sp_a;
    logic [31:0] sp_v;
    logic [2:0]  sp_s;
    sp_do = 1'b0;
    sp_a  = '0;
    sp_v  = '0;
    sp_s  = '0;
    if (!rst_n) begin
      st               <= S_CFG;
      cnt              <= '0;
      sweep            <= '0;
      sub              <= '0;
      address          <= '0;
      datain           <= '0;
      read             <= 1'b0;
      write            <= 1'b0;
      spreg_clk        <= 1'b0;
      spreg_addr       <= '0;
      start_write_read <= 1'b0;
      stop_test        <= 1'b0;
      puf_phase        <= 1'b0;
    end else begin
      unique case (st)
        S_CFG: begin
          cnt <= cnt + 5'd1;
          if (cnt >= 5'd2 && cnt <= 5'd4) begin
            sp_do = 1'b1; sp_a = 4'd1; sp_v = cfg_spreg1 & ~(32'd1 << SP1_PUF_BIT); sp_s = 3'(cnt - 5'd2);
          end else if (cnt >= 5'd5 && cnt <= 5'd7) begin
            sp_do = 1'b1; sp_a = 4'd2; sp_v = cfg_spreg2; sp_s = 3'(cnt - 5'd5);
          end
          if (cnt == 5'(START_CNT)) begin
            start_write_read <= 1'b1;
            sweep            <= '0;
            st               <= (cfg_mode == MODE_RD) ? S_READ : S_WRITE;
          end
        end
        S_WRITE: begin
          write   <= 1'b1;
          read    <= 1'b0;
          address <= cur_addr;
          datain  <= pattern_data(sram_pat_e'(cfg_pattern), cur_addr);
          sweep   <= sweep + 1'b1;
          if (sweep == CW'(N_ADDR - 1)) begin
            sub <= '0;
            st  <= (cfg_mode == MODE_WR)  ? S_DRAIN :
                   (cfg_mode == MODE_PUF) ? S_PUF_ON : S_READ;
          end
        end
        S_PUF_ON: begin
          write <= 1'b0;
          sp_do = 1'b1; sp_a = 4'd1; sp_v = cfg_spreg1 | (32'd1 << SP1_PUF_BIT); sp_s = sub;
          sub <= sub + 3'd1;
          if (sub == 3'd2) begin
            puf_phase <= 1'b1;
            st        <= S_READ_P;
          end
        end
        S_READ_P: begin
          read    <= 1'b1;
          address <= cur_addr;
          sweep   <= sweep + 1'b1;
          if (sweep == CW'(N_ADDR - 1)) begin
            sub <= '0;
            st  <= S_PUF_OFF;
          end
        end
        S_PUF_OFF: begin
          read <= 1'b0;
          sp_do = 1'b1; sp_a = 4'd1; sp_v = cfg_spreg1 & ~(32'd1 << SP1_PUF_BIT); sp_s = sub;
          sub <= sub + 3'd1;
          if (sub == 3'd2) begin
            puf_phase <= 1'b0;
            st        <= S_READ;
          end
        end
        S_READ: begin
          write   <= 1'b0;
          read    <= 1'b1;
          address <= cur_addr;
          sweep   <= sweep + 1'b1;
          if (sweep == CW'(N_ADDR - 1)) begin
            sub <= '0;
            st  <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          read  <= 1'b0;
          write <= 1'b0;
          sub   <= sub + 3'd1;
          if (sub == 3'd1) st <= S_DONE;
        end
        S_DONE: stop_test <= 1'b1;
        default: st <= S_DONE;
      endcase
      if (sp_do) begin
        case (sp_s)
          3'd0: begin spreg_addr <= sp_a; datain <= sp_v; end
          3'd1: spreg_clk <= 1'b1;
          default: spreg_clk <= 1'b0;
        endcase
      end
    end
  end

  // the SRAM is never asked to read and write in the same cycle
  a_no_rw_together: assert property (@(posedge tb_clk) disable iff (!rst_n) !(read && write));
endmodule
