48656c6c
6f20576f
726c6421
0a000000
