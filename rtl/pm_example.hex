94010304
8C040205
7FFFFFFF
